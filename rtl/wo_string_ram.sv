// wo_string_ram: the block RAM that holds the write-once strings of one
// replica (client id, sequence number and request of every slot), protected
// by an error-correcting code.
//
// It is a dual-port RAM with one twist that makes it write-once: the write
// enable from the memory controller (a_we) is ANDed with the permission from
// the tag logic (a_allow), so a refused write leaves the word untouched. Port A
// belongs to the owner replica (read/write with byte strobes), port B is
// read-only and serves the peer replicas and the trusted copy unit.
// Every byte is stored as a 13-bit SECDED word (ibft_pkg::ecc_encode), so byte
// writes need no read-modify-write. Reads correct a single flipped bit per
// byte and flag two flipped bits as uncorrectable (a_ue / b_ue); the memory
// tile turns that into a detectable crash. After reset the RAM writes encoded
// zeros into every word, one word per cycle, so no word holds an invalid code;
// init_done stays low (and the tile holds off all accesses) until the sweep is
// over, DEPTH cycles after reset.
// Timing: synchronous read, data one cycle after the enable (read-first on a
// write); the decoder sits after the read register.
// The AND gate and the crash-on-uncorrectable-error behaviour follow the
// proof-of-concept's design; the code, the byte granularity and the clearing
// sweep are this design's choices. There is no background scrubber: a
// corrected error is corrected in the read data only.
module wo_string_ram
  import ibft_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = 4 * ECC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_done,
  // port A: owner
  input  logic              a_en,
  input  logic              a_we,
  input  logic              a_allow,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  input  logic [3:0]        a_wstrb,
  output logic [DATA_W-1:0] a_rdata,
  output logic              a_ue,
  // port B: read only
  input  logic              b_en,
  input  logic [AW-1:0]     b_addr,
  output logic [DATA_W-1:0] b_rdata,
  output logic              b_ue
);

  logic [CW-1:0] mem [DEPTH];
  logic [CW-1:0] a_code_q, b_code_q;

  // clearing sweep after reset
  logic          init_q;
  logic [AW-1:0] init_addr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q      <= 1'b1;
      init_addr_q <= '0;
    end else if (init_q) begin
      init_addr_q <= init_addr_q + AW'(1);
      if (init_addr_q == AW'(DEPTH - 1)) init_q <= 1'b0;
    end
  end
  assign init_done = !init_q;

  // one write port, shared by the sweep and the owner
  logic          we_eff;
  logic [AW-1:0] w_addr;
  logic [3:0]    w_lane;
  logic [CW-1:0] w_code;
  assign we_eff = a_en && a_we && a_allow;
  assign w_addr = init_q ? init_addr_q : a_addr;
  always_comb begin
    for (int b = 0; b < 4; b++) begin
      w_lane[b]                = init_q || (we_eff && a_wstrb[b]);
      w_code[ECC_W*b +: ECC_W] = ecc_encode(init_q ? 8'h00 : a_wdata[8*b +: 8]);
    end
  end

  always_ff @(posedge clk) begin
    if (a_en && !init_q) a_code_q <= mem[a_addr];
    for (int b = 0; b < 4; b++)
      if (w_lane[b]) mem[w_addr][ECC_W*b +: ECC_W] <= w_code[ECC_W*b +: ECC_W];
  end

  always_ff @(posedge clk) begin
    if (b_en) b_code_q <= mem[b_addr];
  end

  // decoders
  always_comb begin
    ecc_dec_t da, db;
    a_ue = 1'b0;
    b_ue = 1'b0;
    for (int b = 0; b < 4; b++) begin
      da = ecc_decode(a_code_q[ECC_W*b +: ECC_W]);
      db = ecc_decode(b_code_q[ECC_W*b +: ECC_W]);
      a_rdata[8*b +: 8] = da.data;
      b_rdata[8*b +: 8] = db.data;
      a_ue |= da.ue;
      b_ue |= db.ue;
    end
  end

endmodule
