// busybox_pkg: constants, types and functions shared by the busy-logic modules.
//
// The serial link to the readout receivers (D-RORCs) carries 16-bit words in a frame of
// two start bits, sixteen data bits, one parity bit and one stop bit, each bit held for
// CYCLES_PER_BIT cycles of the fast clock. The receiver takes the majority of the three
// middle samples of every bit. Command words sent to the D-RORCs carry a 4-bit command
// type and a 4-bit request ID; D-RORC replies are 48 bits: request ID, bunch-crossing ID,
// orbit ID and D-RORC ID. Frame layout, command codes, reply layout, majority voting and
// the Hamming check-bit equations follow the source design. The parity sense (even) and
// where the Hamming check bits travel in the word are this design's own choices.
package busybox_pkg;

  // Serial link framing
  localparam int unsigned CYCLES_PER_BIT = 5;   // samples per bit (default generic)
  localparam int unsigned FRAME_BITS     = 20;  // 2 start + 16 data + parity + stop

  // Command types sent to the D-RORCs (bits 15:12 of the command word)
  typedef enum logic [3:0] {
    CMD_REQUEST_EVENTID = 4'b0100,
    CMD_RESEND_LAST     = 4'b0101,
    CMD_FORCE_POP       = 4'b0110,
    CMD_FORCE_REQID     = 4'b0111
  } cmd_t;

  // D-RORC reply: 48 bits, most significant field first
  typedef struct packed {
    logic [3:0]  request_id;   // 47:44
    logic [11:0] bunch_id;     // 43:32
    logic [23:0] orbit_id;     // 31:8
    logic [7:0]  drorc_id;     // 7:0
  } drorc_msg_t;

  // Reply as stored in the RX memory and passed to the verification logic:
  // the receiving channel number appended above the 48-bit reply.
  typedef struct packed {
    logic [7:0]  channel;      // 55:48
    drorc_msg_t  msg;          // 47:0
  } rx_word_t;

  // Event ID: bunch-crossing ID (12 bits) above orbit ID (24 bits)
  typedef struct packed {
    logic [11:0] bunch_id;
    logic [23:0] orbit_id;
  } event_id_t;

  // Register block addresses (DCS address bits 14:12)
  localparam logic [2:0] MOD_TX      = 3'd0;   // 0x0xxx transmitter
  localparam logic [2:0] MOD_RXMEM   = 3'd1;   // 0x1xxx RX memory
  localparam logic [2:0] MOD_CSR     = 3'd2;   // 0x2xxx control and status
  localparam logic [2:0] MOD_TRIGGER = 3'd3;   // 0x3xxx trigger receiver

  // Majority of three samples
  function automatic logic majority3(input logic [2:0] s);
    return (s[0] & s[1]) | (s[0] & s[2]) | (s[1] & s[2]);
  endfunction

  // Even parity bit of a 16-bit word: XOR of all data bits
  function automatic logic parity16(input logic [15:0] d);
    return ^d;
  endfunction

  // Check bits of the 8:4 Hamming code for one nibble, returned as {P4,P3,P2,P1}.
  // Data bits D1..D4 are nibble bits 0..3. P1 covers D1,D2,D4; P2 covers D1,D3,D4;
  // P3 covers D2,D3,D4; P4 is the parity over the other seven code bits.
  function automatic logic [3:0] hamming_check(input logic [3:0] d);
    logic p1, p2, p3, p4;
    p1 = d[0] ^ d[1] ^ d[3];
    p2 = d[0] ^ d[2] ^ d[3];
    p3 = d[1] ^ d[2] ^ d[3];
    p4 = ^d ^ p1 ^ p2 ^ p3;
    return {p4, p3, p2, p1};
  endfunction

  // Command word sent on the serial link. The 8-bit transmit byte holds the command type
  // in bits 3:0 and the request ID in bits 7:4. On the link the command type occupies
  // bits 15:12 and the request ID bits 11:8; the Hamming check bits of the two nibbles
  // fill the otherwise unused bits 7:4 and 3:0.
  function automatic logic [15:0] command_word(input logic [7:0] tx_byte);
    logic [3:0] cmd, reqid;
    cmd   = tx_byte[3:0];
    reqid = tx_byte[7:4];
    return {cmd, reqid, hamming_check(cmd), hamming_check(reqid)};
  endfunction

endpackage
