// crash_device: deliberate, consensual crashing of a write-once memory.
//
// A replica that has shown itself to be Byzantine can be silenced by crashing
// its write-once memory: from then on the memory answers every access with
// SLVERR, so its owner can neither propose nor vote, and everybody can see
// that it crashed. Because crashing is itself a critical operation, one
// replica cannot do it alone: every replica has its own AXI4-Lite port (the
// interconnect maps port k only to replica k) and casts write-once votes
// against memories; memory j is crashed once f+1 replicas voted against it.
// A crash, like the votes, lasts until power-on reset; the consensual buffer
// reset does not undo it.
// Register (any address): write bits N-1:0 = memories this replica votes
// against (bits are only ever added); read returns this replica's votes in
// bits N-1:0 and the crashed memories in bits 16+N-1:16.
// That deliberate crashing needs agreement among the replicas follows the
// document; the vote register, the f+1 threshold (the same as for the reset)
// and the register layout are this design's choices.
// Timing: mem_crash[j] rises in the cycle after the deciding vote reaches the
// device and stays high.
module crash_device
  import ibft_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t [N-1:0] s_req,
  output axil_rsp_t [N-1:0] s_rsp,
  output logic [N-1:0]      mem_crash
);

  localparam int unsigned Q  = quorum(N);
  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]              b_req, b_we, b_rvalid;
  logic [N-1:0][ADDR_W-1:0]  b_addr;
  logic [N-1:0][DATA_W-1:0]  b_wdata, b_rdata;
  logic [N-1:0][3:0]         b_wstrb;

  for (genvar k = 0; k < N; k++) begin : g_port
    axil_slave u_port (
      .clk, .rst_n, .s_req(s_req[k]), .s_rsp(s_rsp[k]),
      .b_req(b_req[k]), .b_we(b_we[k]), .b_addr(b_addr[k]), .b_wdata(b_wdata[k]),
      .b_wstrb(b_wstrb[k]), .b_gnt(b_req[k]), .b_rvalid(b_rvalid[k]),
      .b_rdata(b_rdata[k]), .b_err(1'b0)
    );
  end

  // votes_q[k][j]: replica k votes to crash memory j
  logic [N-1:0][N-1:0] votes_q, votes_d;
  logic [N-1:0]        crash_q;

  always_comb begin
    votes_d = votes_q;
    for (int k = 0; k < N; k++)
      if (b_req[k] && b_we[k])
        for (int j = 0; j < N; j++)
          if (b_wstrb[k][j / 8] && b_wdata[k][j]) votes_d[k][j] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      votes_q  <= '0;
      crash_q  <= '0;
      b_rvalid <= '0;
      b_rdata  <= '0;
    end else begin
      votes_q <= votes_d;
      for (int j = 0; j < N; j++) begin
        logic [CW-1:0] n;
        n = '0;
        for (int k = 0; k < N; k++) n = n + CW'(votes_d[k][j]);
        if (n >= CW'(Q)) crash_q[j] <= 1'b1;
      end
      for (int k = 0; k < N; k++) begin
        b_rvalid[k] <= b_req[k];
        b_rdata[k]  <= '0;
        b_rdata[k][N-1:0]     <= votes_q[k];
        b_rdata[k][16 +: N]   <= crash_q;
      end
    end
  end

  assign mem_crash = crash_q;

  initial assert (N <= 16) else $error("crash_device: at most 16 replicas");

endmodule
