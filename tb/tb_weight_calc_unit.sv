// tb_weight_calc_unit: checks the weight code of the colour/grey weight unit
// against floor(log2(255 / (1 + |d|))) computed with a real division
// (seg_ref_pkg): every difference 0..255 on each channel, random colour pairs
// (minimum over R, G, B), grey mode (channel 0 only) and an invalid link.
module tb_weight_calc_unit;
  import seg_pkg::*;
  import seg_ref_pkg::*;

  pix_t  a [3], b [3];
  logic  v, grey;
  code_t w;
  int checks = 0, failures = 0;

  weight_calc_unit #(.CH(3)) dut (.pix_a(a), .pix_b(b), .link_valid(v), .grey_mode(grey), .weight(w));

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
    int e, ec;
    v = 1'b1; grey = 1'b1;
    for (int d = 0; d < 256; d++) begin
      a[0] = pix_t'(d); b[0] = 8'd0; a[1] = 8'd3; b[1] = 8'd250; a[2] = 8'd0; b[2] = 8'd255;
      #1 check(int'(w) == ref_code(d, 0), $sformatf("grey d=%0d code %0d exp %0d", d, w, ref_code(d, 0)));
      b[0] = pix_t'(d); a[0] = 8'd0;
      #1 check(int'(w) == ref_code(0, d), $sformatf("grey -d=%0d", d));
    end
    grey = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      for (int c = 0; c < 3; c++) begin
        a[c] = pix_t'($urandom_range(0, 255));
        b[c] = (i % 2 == 0) ? pix_t'($urandom_range(0, 255))
                            : pix_t'(int'(a[c]) + int'($urandom_range(0, 8)) > 255 ? 255 : int'(a[c]) + int'($urandom_range(0, 8)));
      end
      e = 7;
      for (int c = 0; c < 3; c++) begin
        ec = ref_code(a[c], b[c]);
        if (ec < e) e = ec;
      end
      #1 check(int'(w) == e, $sformatf("colour %0d: code %0d exp %0d", i, w, e));
      grey = 1'b1;
      #1 check(int'(w) == ref_code(a[0], b[0]), "grey on colour data");
      v = 1'b0;
      #1 check(w == '0, "invalid link not zero");
      v = 1'b1; grey = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
