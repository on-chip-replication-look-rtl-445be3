// tb_crash_device: self-checking test of the consensual crash device (n = 3,
// quorum 2). It checks that one replica's vote, even repeated, crashes
// nothing; that a write with its byte strobe cleared is no vote; that a
// second replica's vote crashes exactly the memory both voted against, in the
// cycle after the deciding vote reaches the device, and for good; that one
// write can vote against several memories; that votes and crashed memories
// read back; and that power-on reset clears everything.
module tb_crash_device;
  import ibft_pkg::*;

  localparam int unsigned N = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  axil_req_t [N-1:0] s_req;
  axil_rsp_t [N-1:0] s_rsp;
  logic [N-1:0]      mem_crash;

  crash_device #(.N(N)) dut (.*);

  axil_req_t r0, r1, r2;
  assign s_req = {r2, r1, r0};
  axil_master m0 (.clk, .req(r0), .rsp(s_rsp[0]));
  axil_master m1 (.clk, .req(r1), .rsp(s_rsp[1]));
  axil_master m2 (.clk, .req(r2), .rsp(s_rsp[2]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // cycle of the last granted write on port 1 and of the first crash
  longint cyc = 0, req_cyc = 0, crash_cyc = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.b_req[1] && dut.b_we[1]) req_cyc <= cyc;
    if (mem_crash[2] && crash_cyc < 0) crash_cyc <= cyc;
  end

  logic [31:0] rd;
  logic [1:0]  resp;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(mem_crash == '0, "nothing crashed after reset");
    m0.write(16'h0, 32'b100, resp);
    check(resp == RESP_OKAY, "vote accepted");
    m0.write(16'h0, 32'b100, resp);
    repeat (3) @(posedge clk);
    check(mem_crash == '0, "one replica cannot crash a memory");
    m2.write(16'h0, 32'b100, resp, 4'b0000);
    repeat (3) @(posedge clk);
    check(mem_crash == '0, "write without strobe is no vote");
    m2.write(16'h0, 32'b001, resp);
    repeat (3) @(posedge clk);
    check(mem_crash == '0, "votes against different memories do not add up");
    m1.write(16'h0, 32'b100, resp);
    @(posedge clk);
    check(mem_crash == 3'b100, $sformatf("memory 2 crashed by two votes: %b", mem_crash));
    check(crash_cyc == req_cyc + 1, $sformatf("crash at %0d, vote at %0d", crash_cyc, req_cyc));
    m0.read(16'h0, rd, resp);
    check(rd[2:0] == 3'b100 && rd[18:16] == 3'b100, $sformatf("replica 0 reads %h", rd));
    m2.read(16'h0, rd, resp);
    check(rd[2:0] == 3'b001, $sformatf("replica 2 reads %h", rd));
    // one write votes against memories 0 and 1; with replica 2's vote on 0
    m1.write(16'h0, 32'b011, resp);
    @(posedge clk);
    check(mem_crash == 3'b101, $sformatf("memory 0 crashed, memory 1 not: %b", mem_crash));
    repeat (10) @(posedge clk);
    check(mem_crash == 3'b101, "crash is permanent");
    // power-on reset
    @(posedge clk);
    #1 rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    check(mem_crash == '0, "power-on reset clears crashes");
    m1.read(16'h0, rd, resp);
    check(rd == 32'h0, "power-on reset clears votes");
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
