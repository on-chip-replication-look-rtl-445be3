// reset_device: the consensual reset of all write-once memories.
//
// Every replica has its own AXI4-Lite port (the interconnect maps port k only
// to replica k), so a replica can only cast its own vote. The device keeps a
// vote bitfield with one write-once bit per replica. When f+1 bits are set it
// raises dev_reset for one cycle: all memories clear their flags (making the
// strings writable again) and set RF, the trusted copy unit clears its
// executed tags, and the votes are cleared. A vote from a replica whose memory
// still has an RF flag set is refused (SLVERR) and not counted, so a lagging
// replica cannot carry its vote over into the next round.
// Register (any address): write bit 0 = 1 casts the vote; a read returns the
// vote vector in bits N-1:0 and the number of resets done in bits 31:16.
// The vote bitfield, the f+1 rule and the RF check follow the protocol; the
// register layout and the reset counter are this design's choices.
// Timing: dev_reset is high in the second cycle after the granted write of the
// deciding vote.
module reset_device
  import ibft_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  axil_req_t [N-1:0]     s_req,
  output axil_rsp_t [N-1:0]     s_rsp,
  input  logic [N-1:0]          rf_any,
  output logic                  dev_reset
);

  localparam int unsigned Q  = quorum(N);
  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]              b_req, b_we, b_rvalid, b_err;
  logic [N-1:0][ADDR_W-1:0]  b_addr;
  logic [N-1:0][DATA_W-1:0]  b_wdata, b_rdata;
  logic [N-1:0][3:0]         b_wstrb;

  for (genvar k = 0; k < N; k++) begin : g_port
    axil_slave u_port (
      .clk, .rst_n, .s_req(s_req[k]), .s_rsp(s_rsp[k]),
      .b_req(b_req[k]), .b_we(b_we[k]), .b_addr(b_addr[k]), .b_wdata(b_wdata[k]),
      .b_wstrb(b_wstrb[k]), .b_gnt(b_req[k]), .b_rvalid(b_rvalid[k]),
      .b_rdata(b_rdata[k]), .b_err(b_err[k])
    );
  end

  logic [N-1:0]  votes_q, votes_d, vote_now;
  logic [15:0]   count_q;
  logic          reset_q;
  logic [CW-1:0] nvotes;

  always_comb begin
    for (int k = 0; k < N; k++)
      vote_now[k] = b_req[k] && b_we[k] && b_wstrb[k][0] && b_wdata[k][0] && !rf_any[k];
    votes_d = votes_q | vote_now;
    nvotes  = '0;
    for (int k = 0; k < N; k++) nvotes = nvotes + CW'(votes_d[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      votes_q  <= '0;
      count_q  <= '0;
      reset_q  <= 1'b0;
      b_rvalid <= '0;
      b_err    <= '0;
      b_rdata  <= '0;
    end else begin
      reset_q <= 1'b0;
      if (nvotes >= CW'(Q)) begin
        votes_q <= '0;
        reset_q <= 1'b1;
        count_q <= count_q + 16'd1;
      end else begin
        votes_q <= votes_d;
      end
      for (int k = 0; k < N; k++) begin
        b_rvalid[k] <= b_req[k];
        b_err[k]    <= b_req[k] && b_we[k] && b_wstrb[k][0] && b_wdata[k][0] && rf_any[k];
        b_rdata[k]  <= {count_q, 16'(votes_q)};
      end
    end
  end

  assign dev_reset = reset_q;

endmodule
