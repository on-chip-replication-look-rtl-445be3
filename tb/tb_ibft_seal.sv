// tb_ibft_seal: self-checking test of the seal detector for n = 3 and n = 5.
// Random A/AE flag patterns are applied and every slot's seal is compared
// with a count of the memories that set A and of those that set AE against
// the quorum f+1.
module tb_ibft_seal;
  import ibft_pkg::*;

  localparam int unsigned SLOTS = 16;

  logic [2:0][SLOTS-1:0] a3, ae3;
  logic [4:0][SLOTS-1:0] a5, ae5;
  logic [SLOTS-1:0]      seal3, seal5;

  ibft_seal #(.N(3), .SLOTS(SLOTS)) dut3 (.a_flags(a3), .ae_flags(ae3), .seal(seal3));
  ibft_seal #(.N(5), .SLOTS(SLOTS)) dut5 (.a_flags(a5), .ae_flags(ae5), .seal(seal5));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int sealed_seen = 0, open_seen = 0;

  initial begin
    for (int it = 0; it < 300; it++) begin
      // a memory sets A or AE for a slot, never both
      for (int k = 0; k < 5; k++)
        for (int s = 0; s < SLOTS; s++) begin
          int v;
          v = $urandom_range(0, 2);
          if (k < 3) begin
            a3[k][s] = (v == 1);
            ae3[k][s] = (v == 2);
          end
          a5[k][s] = (v == 1);
          ae5[k][s] = (v == 2);
        end
      #1;
      for (int s = 0; s < SLOTS; s++) begin
        int na3, ne3, na5, ne5;
        na3 = 0; ne3 = 0; na5 = 0; ne5 = 0;
        for (int k = 0; k < 3; k++) begin
          na3 += a3[k][s];
          ne3 += ae3[k][s];
        end
        for (int k = 0; k < 5; k++) begin
          na5 += a5[k][s];
          ne5 += ae5[k][s];
        end
        check(seal3[s] == (na3 >= 2 || ne3 >= 2), $sformatf("n=3 slot %0d A=%0d AE=%0d", s, na3, ne3));
        check(seal5[s] == (na5 >= 3 || ne5 >= 3), $sformatf("n=5 slot %0d A=%0d AE=%0d", s, na5, ne5));
        if (seal5[s]) sealed_seen++; else open_seen++;
      end
    end
    check(sealed_seen > 0 && open_seen > 0, $sformatf("both outcomes seen: %0d sealed, %0d open", sealed_seen, open_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
