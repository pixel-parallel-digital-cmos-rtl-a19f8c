// tb_leader_calc_unit: random groups of four weight codes in phase 0 and
// phase 1; p must equal (sum of the eight decoded weights > phi_p), with the
// decoded value 2^code (0 for code 0) worked out here. Includes sums exactly
// at the threshold.
module tb_leader_calc_unit;
  import seg_pkg::*;
  import seg_ref_pkg::*;

  logic clk = 1'b0, en = 1'b0, phase = 1'b0, p;
  code_t w [4];
  sum_t phi_p;
  int checks = 0, failures = 0;

  leader_calc_unit dut (.clk(clk), .en(en), .phase(phase), .w(w), .phi_p(phi_p), .p(p));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = 1'b1; phase = 1'b0; s = 0;
      for (int k = 0; k < 4; k++) begin w[k] = code_t'($urandom_range(0, 7)); s += ref_dec(w[k]); end
      @(negedge clk);
      phase = 1'b1;
      for (int k = 0; k < 4; k++) begin w[k] = code_t'($urandom_range(0, 7)); s += ref_dec(w[k]); end
      case (i % 3)
        0: phi_p = sum_t'(s);          // equal: not a leader
        1: phi_p = sum_t'(s > 0 ? s - 1 : 0);
        default: phi_p = sum_t'($urandom_range(0, 1100));
      endcase
      #1;
      checks++;
      if (p != (s > int'(phi_p))) begin
        failures++;
        $display("FAIL: sum %0d phi_p %0d p %0b", s, phi_p, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
