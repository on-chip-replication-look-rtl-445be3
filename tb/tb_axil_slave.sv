// tb_axil_slave: self-checking test of the AXI4-Lite slave front end.
// A small register file behind the internal bus grants after a random delay
// and flags addresses with bit 15 set as errors. The test writes and reads
// random words, checks read data against a reference array, checks that errors
// come back as SLVERR on both B and R, checks byte strobes, and checks that an
// uncontended write with an immediate grant shows B two cycles after AW/W are accepted.
module tb_axil_slave;
  import ibft_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic              b_req, b_we, b_gnt, b_rvalid, b_err;
  logic [ADDR_W-1:0] b_addr;
  logic [DATA_W-1:0] b_wdata, b_rdata;
  logic [3:0]        b_wstrb;

  axil_slave dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .b_req, .b_we, .b_addr, .b_wdata,
                  .b_wstrb, .b_gnt, .b_rvalid, .b_rdata, .b_err);
  axil_master m (.clk, .req, .rsp);

  // device model: 16 registers, grant after gnt_delay cycles
  logic [DATA_W-1:0] regs [16];
  int gnt_delay = 0;
  int wait_cnt = 0;
  assign b_gnt = b_req && (wait_cnt >= gnt_delay);
  always_ff @(posedge clk) begin
    wait_cnt <= (b_req && !b_gnt) ? wait_cnt + 1 : 0;
    b_rvalid <= b_gnt;
    b_err    <= b_gnt && b_addr[15];
    if (b_gnt) begin
      b_rdata <= regs[b_addr[5:2]];
      if (b_we && !b_addr[15])
        for (int i = 0; i < 4; i++) if (b_wstrb[i]) regs[b_addr[5:2]][8*i +: 8] <= b_wdata[8*i +: 8];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [DATA_W-1:0] refm [16];
  logic [DATA_W-1:0] rd;
  logic [1:0]        resp;
  longint            t0;

  initial begin
    for (int i = 0; i < 16; i++) begin
      regs[i] = '0;
      refm[i] = '0;
    end
    b_rvalid = 1'b0;
    b_err = 1'b0;
    b_rdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int it = 0; it < 200; it++) begin
      int a;
      logic [DATA_W-1:0] d;
      a = $urandom_range(0, 15);
      d = $urandom;
      gnt_delay = $urandom_range(0, 3);
      if ($urandom_range(0, 1) == 0) begin
        m.write(ADDR_W'(a * 4), d, resp);
        refm[a] = d;
        check(resp == RESP_OKAY, "write OKAY");
      end else begin
        m.read(ADDR_W'(a * 4), rd, resp);
        check(resp == RESP_OKAY && rd == refm[a], $sformatf("read %0d got %h want %h", a, rd, refm[a]));
      end
    end
    // byte strobes
    m.write(16'h0008, 32'h11223344, resp);
    m.write(16'h0008, 32'hAABBCCDD, resp, 4'b0101);
    m.read(16'h0008, rd, resp);
    check(rd == 32'h11BB33DD, $sformatf("strobes got %h", rd));
    // errors
    gnt_delay = 0;
    m.write(16'h8004, 32'h1, resp);
    check(resp == RESP_SLVERR, "write error gives SLVERR");
    m.read(16'h8004, rd, resp);
    check(resp == RESP_SLVERR, "read error gives SLVERR");
    m.read(16'h0008, rd, resp);
    check(resp == RESP_OKAY, "error does not stick");
    // latency: AW/W accepted at edge 0, B valid after 2 more edges
    @(posedge clk);
    #1;
    req.aw_valid = 1'b1; req.aw_addr = 16'h0004; req.w_valid = 1'b1; req.w_data = 32'h5;
    req.w_strb = 4'hF; req.b_ready = 1'b1;
    @(negedge clk);
    check(rsp.aw_ready && rsp.w_ready, "AW and W accepted in the first cycle");
    t0 = 0;
    @(posedge clk);
    #1 req.aw_valid = 1'b0; req.w_valid = 1'b0;
    while (!rsp.b_valid && t0 < 50) begin
      @(posedge clk);
      #1 t0++;
    end
    check(t0 == 2, $sformatf("B valid %0d cycles after acceptance, want 2", t0));
    @(posedge clk);
    #1 req.b_ready = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
