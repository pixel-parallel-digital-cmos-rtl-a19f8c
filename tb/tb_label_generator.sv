// tb_label_generator: the label starts at 1 after clr, advances once per
// labelw clock, saturates at the largest label and seg_count = label - 1.
module tb_label_generator;
  import seg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, labelw = 1'b0;
  label_t label, seg_count;
  int checks = 0, failures = 0;

  label_generator dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 3; f++) begin
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      e = 1;
      check(label == 1 && seg_count == 0, "start at 1");
      for (int i = 0; i < ((f == 2) ? 4200 : 300); i++) begin
        labelw = (f == 2) ? 1'b1 : 1'($urandom_range(0, 1));
        @(negedge clk);
        if (labelw && e < 4095) e++;
        check(int'(label) == e && int'(seg_count) == e - 1, $sformatf("label %0d expected %0d", label, e));
      end
      labelw = 1'b0;
    end
    check(label == 12'hfff, "saturation reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
