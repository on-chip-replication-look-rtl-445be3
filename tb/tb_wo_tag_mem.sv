// tb_wo_tag_mem: self-checking test of the write-once tag logic.
// A reference model keeps every flag as a three-valued state (clear, agreed,
// error) plus RF per slot and predicts fw_ok, the stored words and the string
// write permission for random flag writes (random strobes, random requests for
// agreement and error bits, including both at once). It also checks the
// consensual reset (all flags clear, RF set, writes refused until RF is
// cleared by a write with the RF bit), the seal input, and the A/AE outputs.
module tb_wo_tag_mem;
  import ibft_pkg::*;

  localparam int unsigned N     = 3;
  localparam int unsigned SLOTS = 8;
  localparam int unsigned AGR_W = 2 * N + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             dev_reset = 1'b0;
  logic [SLOTS-1:0] seal = '0;
  logic             fw_en = 1'b0;
  logic [2:0]       fw_slot = '0, sw_slot = '0, rd_slot_a = '0, rd_slot_b = '0;
  logic [31:0]      fw_data = '0;
  logic [3:0]       fw_strb = '0;
  logic             fw_ok, sw_allow, rf_any;
  logic [31:0]      rd_word_a, rd_word_b;
  logic [SLOTS-1:0] a_flags, ae_flags;

  wo_tag_mem #(.N(N), .SLOTS(SLOTS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // model: 0 clear, 1 agreed, 2 error
  int   st [SLOTS][AGR_W];
  bit   rf [SLOTS];

  function automatic logic [31:0] model_word(int s);
    logic [31:0] w = '0;
    for (int i = 0; i < AGR_W; i++) begin
      if (st[s][i] == 1) w[i] = 1'b1;
      if (st[s][i] == 2) w[16 + i] = 1'b1;
    end
    w[15] = rf[s];
    return w;
  endfunction

  // one flag write: returns the predicted ok and updates the model
  function automatic bit model_write(int s, logic [31:0] d, logic [3:0] strb, bit sealed);
    logic [31:0] m;
    bit ok = 1;
    for (int b = 0; b < 4; b++) m[8*b +: 8] = strb[b] ? d[8*b +: 8] : 8'h0;
    if (sealed) return 0;
    if (rf[s]) begin
      if (m[15]) rf[s] = 0;
      return m[15];
    end
    for (int i = 0; i < AGR_W; i++) begin
      bit ra = m[i], re = m[16 + i];
      if (ra && re) ok = 0;
      else if (ra) begin
        if (st[s][i] == 2) ok = 0; else st[s][i] = 1;
      end else if (re) begin
        if (st[s][i] == 1) ok = 0; else st[s][i] = 2;
      end
    end
    return ok;
  endfunction

  task automatic do_write(int s, logic [31:0] d, logic [3:0] strb);
    bit exp_ok;
    exp_ok = model_write(s, d, strb, seal[s]);
    fw_en = 1'b1; fw_slot = 3'(s); fw_data = d; fw_strb = strb;
    @(negedge clk);
    check(fw_ok == exp_ok, $sformatf("fw_ok slot %0d data %h got %0d want %0d", s, d, fw_ok, exp_ok));
    @(posedge clk);
    #1 fw_en = 1'b0;
  endtask

  task automatic check_all(string tag);
    for (int s = 0; s < SLOTS; s++) begin
      bit any = 0;
      rd_slot_a = 3'(s); rd_slot_b = 3'((s + 3) % SLOTS); sw_slot = 3'(s);
      #1;
      for (int i = 0; i < AGR_W; i++) if (st[s][i] != 0) any = 1;
      check(rd_word_a == model_word(s), $sformatf("%s word %0d got %h want %h", tag, s, rd_word_a, model_word(s)));
      check(rd_word_b == model_word((s + 3) % SLOTS), $sformatf("%s port b word", tag));
      check(sw_allow == (!any && !rf[s]), $sformatf("%s sw_allow slot %0d", tag, s));
      check(a_flags[s] == (st[s][2*N] == 1) && ae_flags[s] == (st[s][2*N] == 2), $sformatf("%s A/AE slot %0d", tag, s));
    end
  endtask

  initial begin
    for (int s = 0; s < SLOTS; s++) begin
      rf[s] = 0;
      for (int i = 0; i < AGR_W; i++) st[s][i] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check_all("after power-on");
    // random flag writes: sparse requests so that flags fill up gradually
    for (int it = 0; it < 400; it++) begin
      logic [31:0] d;
      int s, k;
      d = '0;
      s = $urandom_range(0, SLOTS - 1);
      k = $urandom_range(1, 2);
      for (int j = 0; j < k; j++) begin
        int i;
        i = $urandom_range(0, AGR_W - 1);
        case ($urandom_range(0, 4))
          0, 1: d[i] = 1'b1;
          2, 3: d[16 + i] = 1'b1;
          default: begin d[i] = 1'b1; d[16 + i] = 1'b1; end
        endcase
      end
      do_write(s, d, ($urandom_range(0, 5) == 0) ? 4'($urandom) : 4'hF);
      if (it % 50 == 49) check_all("random");
    end
    check(rf_any == 1'b0, "no RF before reset");
    // consensual reset
    @(posedge clk);
    #1 dev_reset = 1'b1;
    @(posedge clk);
    #1 dev_reset = 1'b0;
    for (int s = 0; s < SLOTS; s++) begin
      rf[s] = 1;
      for (int i = 0; i < AGR_W; i++) st[s][i] = 0;
    end
    check(rf_any == 1'b1, "RF after reset");
    check_all("after reset");
    do_write(1, 32'h0000_0001, 4'hF);   // refused: RF set
    do_write(1, 32'h0000_8000, 4'hF);   // clears RF
    do_write(1, 32'h0000_0001, 4'hF);   // now accepted
    check_all("RF cleared");
    for (int s = 0; s < SLOTS; s++) if (rf[s]) do_write(s, 32'h0000_8000, 4'hF);
    check(rf_any == 1'b0, "all RF cleared");
    // seal: slot 2 frozen
    do_write(2, 32'h0000_0040, 4'hF);   // A
    seal[2] = 1'b1;
    do_write(2, 32'h0000_0002, 4'hF);   // refused while sealed
    do_write(3, 32'h0040_0000, 4'hF);   // AE in another slot
    check_all("seal");
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
