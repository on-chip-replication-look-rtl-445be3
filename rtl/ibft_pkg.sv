// ibft_pkg: types and constants shared by the write-once memory, the reset
// device and the trusted copy unit of the iBFT replication hardware.
//
// Bitfield word of one slot (32 bits, N replicas, N <= 7):
//   bits  [N-1:0]      P[k]  prepare agreement flags
//   bits  [2N-1:N]     C[k]  commit agreement flags
//   bit   2N           A     ready-to-execute (accept) flag
//   bit   15           RF    "reset just happened" flag
//   bits  16 + same    PE, CE, AE error forms of the flags above
// Each flag is tri-state (clear / agreement / error). The flag names follow the
// protocol; the bit positions and the address map are this design's choice.
//
// Address map of a write-once memory (byte addresses, 32-bit words):
//   bit FLAG_BIT = 0 : string region, slot s word w at (s*STR_WORDS + w) * 4
//   bit FLAG_BIT = 1 : bitfield region, slot s at s * 4
//
// Internal word bus (axil_slave to device): a request is held until granted;
// the response arrives exactly one cycle after the grant.
//
// String RAM error code (this design's choice of code): every byte is stored
// as a 13-bit SECDED word, an extended Hamming code. Bit 0 is the overall
// parity; bits 12:1 are Hamming positions 1..12 with check bits at positions
// 1, 2, 4, 8 and the data bits, LSB first, at positions 3, 5, 6, 7, 9, 10, 11,
// 12. Check bit p is the XOR of all positions i != p with (i & p) != 0. A
// single flipped bit is corrected; two flipped bits are detected.
package ibft_pkg;

  localparam int unsigned DATA_W   = 32;
  localparam int unsigned ADDR_W   = 16;
  localparam int unsigned FLAG_BIT = 14;
  localparam int unsigned ERR_OFS  = 16;
  localparam int unsigned RF_BIT   = 15;

  // AXI4-Lite response codes
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  // AXI4-Lite master-to-slave signals
  typedef struct packed {
    logic              aw_valid;
    logic [ADDR_W-1:0] aw_addr;
    logic              w_valid;
    logic [DATA_W-1:0] w_data;
    logic [3:0]        w_strb;
    logic              b_ready;
    logic              ar_valid;
    logic [ADDR_W-1:0] ar_addr;
    logic              r_ready;
  } axil_req_t;

  // AXI4-Lite slave-to-master signals
  typedef struct packed {
    logic              aw_ready;
    logic              w_ready;
    logic              b_valid;
    logic [1:0]        b_resp;
    logic              ar_ready;
    logic              r_valid;
    logic [DATA_W-1:0] r_data;
    logic [1:0]        r_resp;
  } axil_rsp_t;

  // Result codes of the trusted copy unit
  typedef enum logic [1:0] {
    TC_NONE    = 2'd0,
    TC_COPIED  = 2'd1,
    TC_SKIPPED = 2'd2,
    TC_REFUSED = 2'd3
  } tc_result_e;

  // Bit positions of the flags of replica k
  function automatic int unsigned p_bit(int unsigned k);
    return k;
  endfunction
  function automatic int unsigned c_bit(int unsigned n, int unsigned k);
    return n + k;
  endfunction
  function automatic int unsigned a_bit(int unsigned n);
    return 2 * n;
  endfunction

  // f + 1 for n = 2f + 1 replicas
  function automatic int unsigned quorum(int unsigned n);
    return (n - 1) / 2 + 1;
  endfunction

  // String word positions used by requests and by the trusted copy
  localparam int unsigned STR_CLIENT = 0;
  localparam int unsigned STR_SEQ    = 1;
  localparam int unsigned STR_DEST   = 2;
  localparam int unsigned STR_SIZE   = 3;
  localparam int unsigned STR_DATA   = 4;

  // SECDED code of one byte
  localparam int unsigned ECC_W = 13;

  typedef struct packed {
    logic [7:0] data;  // corrected data
    logic       ce;    // a single error was corrected
    logic       ue;    // an uncorrectable error was detected
  } ecc_dec_t;

  function automatic logic [ECC_W-1:0] ecc_encode(logic [7:0] d);
    logic [12:1] h;
    h = '0;
    {h[12], h[11], h[10], h[9], h[7], h[6], h[5], h[3]} = d;
    for (int p = 1; p <= 8; p *= 2) begin
      logic x;
      x = 1'b0;
      for (int i = 3; i <= 12; i++)
        if ((i & p) != 0 && i != p) x ^= h[i];
      h[p] = x;
    end
    return {h, ^h};
  endfunction

  function automatic ecc_dec_t ecc_decode(logic [ECC_W-1:0] c);
    ecc_dec_t    r;
    logic [12:1] h;
    logic [3:0]  syn;
    logic        odd;
    h   = c[12:1];
    odd = ^c;
    syn = '0;
    for (int i = 1; i <= 12; i++)
      if (h[i]) syn ^= 4'(i);
    r.ce = 1'b0;
    r.ue = 1'b0;
    if (odd) begin
      // one error: in the overall parity bit (syn = 0) or at position syn
      if (syn > 4'd12) r.ue = 1'b1;
      else begin
        r.ce = 1'b1;
        if (syn != '0) h[syn] = ~h[syn];
      end
    end else if (syn != '0) begin
      r.ue = 1'b1;  // two errors
    end
    r.data = {h[12], h[11], h[10], h[9], h[7], h[6], h[5], h[3]};
    return r;
  endfunction

endpackage
