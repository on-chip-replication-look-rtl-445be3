// tb_trusted_copy: self-checking test of the trusted copy unit (n = 3,
// 8 slots of 16 words). The write-once memories are modelled by arrays that
// answer string reads one cycle after the request, and the A/AE flags are
// driven directly. The test checks: a copy of an agreed slot sends exactly the
// (address, data) pairs of the triplet from the lowest memory with A set; a
// second copy of the same slot, a slot whose predecessor is not executed and a
// slot without f+1 agreement are refused; a slot with f+1 AE flags is skipped
// without writes; an oversized size field is clipped; two replicas asking for
// the same slot at once get one copy and one refusal; the consensual reset
// clears the executed tags; status reads; consecutive data words leave the
// unit every 3 cycles when the destination is always ready. Crashed memories:
// a crashed memory is never the source; when the source crashes during a
// copy the unit finishes it from the other agreeing memory; when every
// agreeing memory has crashed the command is refused.
module tb_trusted_copy;
  import ibft_pkg::*;

  localparam int unsigned N         = 3;
  localparam int unsigned SLOTS     = 8;
  localparam int unsigned STR_WORDS = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     dev_reset = 1'b0;
  axil_req_t [N-1:0]        s_req;
  axil_rsp_t [N-1:0]        s_rsp;
  logic [N-1:0][SLOTS-1:0]  a_flags = '0, ae_flags = '0;
  logic [N-1:0]             crashed = '0;
  logic [N-1:0]             rd_req, rd_rvalid;
  logic [6:0]               rd_addr;
  logic [N-1:0][31:0]       rd_rdata;
  logic                     dst_valid, dst_ready;
  logic [31:0]              dst_addr, dst_data;

  trusted_copy #(.N(N), .SLOTS(SLOTS), .STR_WORDS(STR_WORDS)) dut (.*);

  axil_req_t r0, r1, r2;
  assign s_req = {r2, r1, r0};
  axil_master m0 (.clk, .req(r0), .rsp(s_rsp[0]));
  axil_master m1 (.clk, .req(r1), .rsp(s_rsp[1]));
  axil_master m2 (.clk, .req(r2), .rsp(s_rsp[2]));

  // memory model
  logic [31:0] str [N][SLOTS * STR_WORDS];
  always_ff @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      rd_rvalid[k] <= rd_req[k];
      if (rd_req[k]) rd_rdata[k] <= str[k][rd_addr];
    end
  end

  // reads served by memory 2
  int n_rd2 = 0;
  always_ff @(posedge clk) if (rd_req[2]) n_rd2 <= n_rd2 + 1;

  // destination: record every write
  logic [31:0] got_addr [$], got_data [$];
  longint      got_cyc [$];
  longint      cyc = 0;
  bit          rand_ready = 1'b0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (dst_valid && dst_ready) begin
      got_addr.push_back(dst_addr);
      got_data.push_back(dst_data);
      got_cyc.push_back(cyc);
    end
  end
  always @(negedge clk) dst_ready <= rand_ready ? 1'($urandom_range(0, 1)) : 1'b1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // write a request triplet into memory k, slot s
  task automatic put(int k, int s, logic [31:0] dest, logic [31:0] size, int seed);
    str[k][s * STR_WORDS + 0] = 32'(k);
    str[k][s * STR_WORDS + 1] = 32'(s);
    str[k][s * STR_WORDS + 2] = dest;
    str[k][s * STR_WORDS + 3] = size;
    for (int w = 4; w < STR_WORDS; w++) str[k][s * STR_WORDS + w] = 32'(seed * 1000 + w);
  endtask

  // expect exactly the writes of slot s taken from memory k
  task automatic expect_copy(int k, int s, int nwords, string tag);
    logic [31:0] dest;
    dest = str[k][s * STR_WORDS + 2];
    check(got_addr.size() == nwords, $sformatf("%s: %0d writes, want %0d", tag, got_addr.size(), nwords));
    for (int i = 0; i < nwords && i < got_addr.size(); i++)
      check(got_addr[i] == dest + 32'(4 * i) && got_data[i] == str[k][s * STR_WORDS + 4 + i],
            $sformatf("%s: word %0d %h<=%h", tag, i, got_addr[i], got_data[i]));
    got_addr.delete();
    got_data.delete();
    got_cyc.delete();
  endtask

  logic [31:0] rd;
  logic [1:0]  resp, resp2;

  initial begin
    for (int k = 0; k < N; k++)
      for (int s = 0; s < SLOTS; s++) put(k, s, 32'h8000_0000 + 32'(s * 64), 32'd3, k * 10 + s);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // slot 0: A in memories 1 and 2 -> copy from memory 1
    a_flags[1][0] = 1'b1;
    a_flags[2][0] = 1'b1;
    m0.write(16'h0, 32'd0, resp);
    check(resp == RESP_OKAY, "slot 0 copied");
    expect_copy(1, 0, 3, "slot 0");
    m0.read(16'h0, rd, resp);
    check(rd[31] && rd[1:0] == TC_COPIED && rd[15:8] == 8'd0, $sformatf("status after copy %h", rd));
    // once only
    m1.write(16'h0, 32'd0, resp);
    check(resp == RESP_SLVERR, "second copy of slot 0 refused");
    m1.read(16'h0, rd, resp);
    check(rd[1:0] == TC_REFUSED, "status refused");
    // order: slot 2 before slot 1
    a_flags[0][2] = 1'b1;
    a_flags[1][2] = 1'b1;
    m2.write(16'h0, 32'd2, resp);
    check(resp == RESP_SLVERR, "slot 2 before slot 1 refused");
    // slot 1 with one A only: no agreement
    a_flags[2][1] = 1'b1;
    m2.write(16'h0, 32'd1, resp);
    check(resp == RESP_SLVERR, "slot 1 without quorum refused");
    check(got_addr.size() == 0, "no writes for refused commands");
    // slot 1 skipped: AE in memories 0 and 1
    ae_flags[0][1] = 1'b1;
    ae_flags[1][1] = 1'b1;
    m2.write(16'h0, 32'd1, resp);
    check(resp == RESP_OKAY, "slot 1 skipped");
    m2.read(16'h4, rd, resp);
    check(rd[31] && rd[1:0] == TC_SKIPPED, $sformatf("status skipped %h", rd));
    check(got_addr.size() == 0, "skip writes nothing");
    // slot 2: size 20 clipped to 12, with a stalling destination
    put(0, 2, 32'h0000_4000, 32'd20, 77);
    rand_ready = 1'b1;
    m1.write(16'h0, 32'd2, resp);
    rand_ready = 1'b0;
    check(resp == RESP_OKAY, "slot 2 copied");
    expect_copy(0, 2, STR_WORDS - 4, "slot 2 clipped");
    // slot 3: two replicas at once, one copy
    a_flags[0][3] = 1'b1;
    a_flags[2][3] = 1'b1;
    fork
      m0.write(16'h0, 32'd3, resp);
      m2.write(16'h0, 32'd3, resp2);
    join
    check((resp == RESP_OKAY) != (resp2 == RESP_OKAY), "one of two simultaneous commands copies");
    expect_copy(0, 3, 3, "slot 3");
    // timing: 3 cycles per word with an always-ready destination
    a_flags[0][4] = 1'b1;
    a_flags[1][4] = 1'b1;
    put(0, 4, 32'h0000_1000, 32'd6, 5);
    m0.write(16'h0, 32'd4, resp);
    check(got_cyc.size() == 6, "slot 4 six words");
    for (int i = 1; i < got_cyc.size(); i++)
      check(got_cyc[i] - got_cyc[i - 1] == 3, $sformatf("word spacing %0d", got_cyc[i] - got_cyc[i - 1]));
    expect_copy(0, 4, 6, "slot 4");
    // slot 5: memory 0 crashed, copy from memory 1
    crashed[0] = 1'b1;
    a_flags[0][5] = 1'b1;
    a_flags[1][5] = 1'b1;
    m2.write(16'h0, 32'd5, resp);
    check(resp == RESP_OKAY, "slot 5 copied with memory 0 crashed");
    expect_copy(1, 5, 3, "slot 5 from memory 1");
    // slot 6: source memory 1 crashes after three words, memory 2 takes over
    put(1, 6, 32'h0000_6000, 32'd8, 66);
    put(2, 6, 32'h0000_6000, 32'd8, 66);
    a_flags[1][6] = 1'b1;
    a_flags[2][6] = 1'b1;
    n_rd2 = 0;
    fork
      m0.write(16'h0, 32'd6, resp);
      begin
        wait (got_addr.size() == 3);
        @(negedge clk);
        crashed[1] = 1'b1;
      end
    join
    check(resp == RESP_OKAY, "slot 6 copied across a source crash");
    check(n_rd2 > 0, "memory 2 took over as source");
    expect_copy(2, 6, 8, "slot 6");
    // slot 7: every agreeing memory has crashed
    a_flags[1][7] = 1'b1;
    a_flags[2][7] = 1'b1;
    crashed = 3'b110;
    m1.write(16'h0, 32'd7, resp);
    check(resp == RESP_SLVERR && got_addr.size() == 0, "slot 7 refused: no live source");
    crashed = '0;
    // reset clears executed tags
    @(posedge clk);
    #1 dev_reset = 1'b1;
    @(posedge clk);
    #1 dev_reset = 1'b0;
    m0.read(16'h0, rd, resp);
    check(!rd[31], "executed tag cleared by reset");
    m0.write(16'h0, 32'd0, resp);
    check(resp == RESP_OKAY, "slot 0 copied again after reset");
    expect_copy(1, 0, 3, "slot 0 after reset");
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
