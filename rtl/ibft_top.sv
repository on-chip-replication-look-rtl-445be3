// ibft_top: hardware support for iBFT, a Byzantine fault tolerant agreement
// protocol run by n = 2f+1 replicas on separate cores that vote through
// shared write-once memories instead of exchanging signed messages.
//
// It holds one write-once memory tile per replica, the seal detector that
// freezes a slot's flags once f+1 replicas accepted or rejected it, the reset
// device that clears all memories after f+1 votes, the crash device that
// crashes a faulty replica's memory after f+1 votes, and the trusted copy
// unit that applies agreed values in slot order. The cores and the interconnect are
// outside: every device port is an AXI4-Lite slave port of the top, and the
// system integrator must map them so that
//   own_req[k]  (read/write) is reachable only from replica k's core,
//   peer_req[k] (read only)  is reachable from the other cores,
//   rst_req[k], tc_req[k], crash_req[k]
//                            are reachable only from replica k's core.
// The trusted copy unit writes agreed data through dst_* to the protected
// platform location. mem_crashed[k] reports a crashed memory, whether crashed
// on purpose or by an uncorrectable RAM error. Defaults: n = 3 (f = 1), 64 slots of 16 words each.
// The structure follows the FPGA proof-of-concept (per-replica tagged memory
// next to a BRAM, a separate reset device, a single trusted copy instance);
// sizes of slots and strings and all register layouts are this design's
// choices (see ibft_pkg).
// Timing: after reset the memories clear their RAMs (SLOTS*STR_WORDS cycles,
// accesses wait); then an uncontended register access takes 4 cycles through
// the AXI4-Lite front ends.
module ibft_top
  import ibft_pkg::*;
#(
  parameter int unsigned N         = 3,
  parameter int unsigned SLOTS     = 64,
  parameter int unsigned STR_WORDS = 16,
  localparam int unsigned RW       = $clog2(SLOTS * STR_WORDS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  axil_req_t [N-1:0]   own_req,
  output axil_rsp_t [N-1:0]   own_rsp,
  input  axil_req_t [N-1:0]   peer_req,
  output axil_rsp_t [N-1:0]   peer_rsp,
  input  axil_req_t [N-1:0]   rst_req,
  output axil_rsp_t [N-1:0]   rst_rsp,
  input  axil_req_t [N-1:0]   tc_req,
  output axil_rsp_t [N-1:0]   tc_rsp,
  input  axil_req_t [N-1:0]   crash_req,
  output axil_rsp_t [N-1:0]   crash_rsp,
  output logic [N-1:0]        mem_crashed,
  output logic                dst_valid,
  output logic [DATA_W-1:0]   dst_addr,
  output logic [DATA_W-1:0]   dst_data,
  input  logic                dst_ready
);

  logic                     dev_reset;
  logic [SLOTS-1:0]         seal;
  logic [N-1:0][SLOTS-1:0]  a_flags, ae_flags;
  logic [N-1:0]             rf_any, mem_crash;
  logic [N-1:0]             tcr_req, tcr_rvalid;
  logic [RW-1:0]            tcr_addr;
  logic [N-1:0][DATA_W-1:0] tcr_rdata;

  for (genvar k = 0; k < N; k++) begin : g_tile
    wo_mem_tile #(.N(N), .SLOTS(SLOTS), .STR_WORDS(STR_WORDS)) u_tile (
      .clk, .rst_n, .dev_reset, .seal,
      .crash(mem_crash[k]), .crashed(mem_crashed[k]),
      .own_req(own_req[k]), .own_rsp(own_rsp[k]),
      .peer_req(peer_req[k]), .peer_rsp(peer_rsp[k]),
      .tcr_req(tcr_req[k]), .tcr_addr, .tcr_rvalid(tcr_rvalid[k]), .tcr_rdata(tcr_rdata[k]),
      .a_flags(a_flags[k]), .ae_flags(ae_flags[k]), .rf_any(rf_any[k])
    );
  end

  ibft_seal #(.N(N), .SLOTS(SLOTS)) u_seal (
    .a_flags, .ae_flags, .seal
  );

  reset_device #(.N(N)) u_reset (
    .clk, .rst_n, .s_req(rst_req), .s_rsp(rst_rsp), .rf_any, .dev_reset
  );

  crash_device #(.N(N)) u_crash (
    .clk, .rst_n, .s_req(crash_req), .s_rsp(crash_rsp), .mem_crash
  );

  trusted_copy #(.N(N), .SLOTS(SLOTS), .STR_WORDS(STR_WORDS)) u_copy (
    .clk, .rst_n, .dev_reset, .s_req(tc_req), .s_rsp(tc_rsp),
    .a_flags, .ae_flags, .crashed(mem_crashed),
    .rd_req(tcr_req), .rd_addr(tcr_addr), .rd_rvalid(tcr_rvalid), .rd_rdata(tcr_rdata),
    .dst_valid, .dst_addr, .dst_data, .dst_ready
  );

endmodule
