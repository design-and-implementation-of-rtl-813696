// tb_gf_const_mult -- exhaustive check of the constant multiplier.
//
// Instantiates gf_const_mult with its default constant (45, the generator
// coefficient g0) and with every other distinct generator coefficient and a
// few syndrome constants, applies all 256 input bytes to each and compares
// with a carry-less reference product. It also checks the worked example
// for g0: 45 times 1,2,4,...,128 gives 45,90,180,117,234,201,143,3.
module tb_gf_const_mult;
  import rs_ref_pkg::*;

  localparam int NC = 12;
  localparam byte unsigned CONSTS [NC] = '{8'd216, 8'd239, 8'd24, 8'd253, 8'd104,
                                            8'd1, 8'd13, 8'd142, 8'd82, 8'd8, 8'd157, 8'd3};

  int checks = 0, failures = 0;
  logic [7:0] a;
  logic [7:0] y_def;
  logic [7:0] y [NC];

  gf_const_mult dut_def (.a(a), .y(y_def));
  for (genvar c = 0; c < NC; c++) begin : g_dut
    gf_const_mult #(.COEF(CONSTS[c])) dut (.a(a), .y(y[c]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned ex [8] = '{45, 90, 180, 117, 234, 201, 143, 3};
    for (int i = 0; i < 8; i++) begin
      a = 8'(1 << i); #1;
      checks++;
      if (y_def !== ex[i]) begin
        failures++; $display("g0 example: 45*%0d = %0d, expected %0d", a, y_def, ex[i]);
      end
    end
    for (int v = 0; v < 256; v++) begin
      a = 8'(v); #1;
      checks++;
      if (y_def !== ref_mul(8'd45, 8'(v))) begin
        failures++; $display("45*%0d = %0d", v, y_def);
      end
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (y[c] !== ref_mul(CONSTS[c], 8'(v))) begin
          failures++; $display("%0d*%0d = %0d, expected %0d", CONSTS[c], v, y[c], ref_mul(CONSTS[c], 8'(v)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
