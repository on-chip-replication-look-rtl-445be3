// wo_tag_mem: the tag logic of one write-once memory ("t-mem"). It stores one
// tri-state write-once bitfield per slot and decides which writes the owner
// replica may make.
//
// Flag writes: the requested bits are ANDed with the inverse of the bits that
// are already set in the other half of the tri-state (agreement against error)
// and then ORed into the stored word, so bits can be set but never cleared,
// and a flag that holds agreement can never turn into an error or back. A
// request for both halves of one flag sets neither (this design's choice).
// String writes: the write enable of the string memory is ANDed with
// sw_allow, which is 1 only while the slot's bitfield is all clear, so a string
// is frozen by the first flag set in its slot (the owner's P flag in practice).
// Reset: dev_reset (the consensual reset) clears every bitfield and sets RF in
// every slot. While RF is set the slot takes no writes at all, except a flag
// write with the RF bit set, which clears RF. Seal: a slot whose A or AE is set
// in f+1 memories (input seal) takes no further flag writes.
// The tri-state flags, the set-only rule, the string lock, RF and the seal
// follow the protocol; bit positions and the power-on state (all clear, RF
// clear) are this design's choices. Bit layout: see ibft_pkg.
//
// Timing: fw_ok, sw_allow and both read words are combinational; the new
// bitfield is visible from the cycle after the write.
module wo_tag_mem
  import ibft_pkg::*;
#(
  parameter int unsigned N     = 3,
  parameter int unsigned SLOTS = 64,
  localparam int unsigned SW   = $clog2(SLOTS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 dev_reset,
  input  logic [SLOTS-1:0]     seal,
  // owner flag write
  input  logic                 fw_en,
  input  logic [SW-1:0]        fw_slot,
  input  logic [DATA_W-1:0]    fw_data,
  input  logic [3:0]           fw_strb,
  output logic                 fw_ok,
  // string write permission for the slot of the address being written
  input  logic [SW-1:0]        sw_slot,
  output logic                 sw_allow,
  // two read ports (owner, peers)
  input  logic [SW-1:0]        rd_slot_a,
  output logic [DATA_W-1:0]    rd_word_a,
  input  logic [SW-1:0]        rd_slot_b,
  output logic [DATA_W-1:0]    rd_word_b,
  // flag summary for the seal detector, trusted copy and reset device
  output logic [SLOTS-1:0]     a_flags,
  output logic [SLOTS-1:0]     ae_flags,
  output logic                 rf_any
);

  localparam int unsigned AGR_W = 2 * N + 1;

  logic [AGR_W-1:0] agr_q [SLOTS];
  logic [AGR_W-1:0] err_q [SLOTS];
  logic [SLOTS-1:0] rf_q;

  // requested bits after byte strobes
  logic [DATA_W-1:0] wd;
  always_comb begin
    for (int b = 0; b < 4; b++) wd[8*b +: 8] = fw_strb[b] ? fw_data[8*b +: 8] : 8'h00;
  end

  logic [AGR_W-1:0] req_a, req_e, both, set_a, set_e;
  logic             req_rf;
  always_comb begin
    req_a  = wd[AGR_W-1:0];
    req_e  = wd[ERR_OFS +: AGR_W];
    req_rf = wd[RF_BIT];
    both   = req_a & req_e;
    set_a  = req_a & ~both & ~err_q[fw_slot];
    set_e  = req_e & ~both & ~agr_q[fw_slot];
    if (seal[fw_slot])      fw_ok = 1'b0;
    else if (rf_q[fw_slot]) fw_ok = req_rf;
    else                    fw_ok = (set_a == req_a) && (set_e == req_e);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SLOTS; s++) begin
        agr_q[s] <= '0;
        err_q[s] <= '0;
      end
      rf_q <= '0;
    end else if (dev_reset) begin
      for (int s = 0; s < SLOTS; s++) begin
        agr_q[s] <= '0;
        err_q[s] <= '0;
      end
      rf_q <= '1;
    end else if (fw_en && !seal[fw_slot]) begin
      if (rf_q[fw_slot]) begin
        if (req_rf) rf_q[fw_slot] <= 1'b0;
      end else begin
        agr_q[fw_slot] <= agr_q[fw_slot] | set_a;
        err_q[fw_slot] <= err_q[fw_slot] | set_e;
      end
    end
  end

  assign sw_allow = !rf_q[sw_slot] && (agr_q[sw_slot] == '0) && (err_q[sw_slot] == '0);

  function automatic logic [DATA_W-1:0] pack_word(logic [AGR_W-1:0] a, logic [AGR_W-1:0] e,
                                                   logic rf);
    logic [DATA_W-1:0] w;
    w = '0;
    w[AGR_W-1:0]         = a;
    w[ERR_OFS +: AGR_W]  = e;
    w[RF_BIT]            = rf;
    return w;
  endfunction

  assign rd_word_a = pack_word(agr_q[rd_slot_a], err_q[rd_slot_a], rf_q[rd_slot_a]);
  assign rd_word_b = pack_word(agr_q[rd_slot_b], err_q[rd_slot_b], rf_q[rd_slot_b]);

  always_comb begin
    for (int s = 0; s < SLOTS; s++) begin
      a_flags[s]  = agr_q[s][a_bit(N)];
      ae_flags[s] = err_q[s][a_bit(N)];
    end
  end
  assign rf_any = |rf_q;

  // The layout keeps agreement bits below RF and error bits in the upper half.
  initial assert (AGR_W <= RF_BIT) else $error("N = %0d needs more than 15 flag bits", N);

  // Once set, an agreement bit and its error bit never both hold.
  for (genvar s = 0; s < SLOTS; s++) begin : g_chk
    a_tristate: assert property (@(posedge clk) disable iff (!rst_n)
      (agr_q[s] & err_q[s]) == '0);
  end

endmodule
