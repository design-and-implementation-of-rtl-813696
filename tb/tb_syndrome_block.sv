// tb_syndrome_block -- checks one syndrome cell datapath.
//
// The default cell (ROOT = 3, constant alpha^3 = 8) is checked on the worked
// example: with r = 0, inputs 1,2,4,...,128 give 8,16,32,64,128,29,58,116.
// Then cells for roots 1, 3, 17 and 32 are checked on all 256 values of s
// with random r: s_next must equal alpha^i * s + r. Cells built for powers
// alpha^8..alpha^14, alpha^253 and alpha^254 must hold the field elements
// 29, 58, 116, 232, 205, 135, 19, 71 and 142.
module tb_syndrome_block;
  import rs_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] s, r;
  logic [7:0] y3, y1, y17, y32;

  syndrome_block dut3 (.s(s), .r(r), .s_next(y3));
  syndrome_block #(.ROOT(1))  dut1  (.s(s), .r(r), .s_next(y1));
  syndrome_block #(.ROOT(17)) dut17 (.s(s), .r(r), .s_next(y17));
  syndrome_block #(.ROOT(32)) dut32 (.s(s), .r(r), .s_next(y32));

  // Field elements alpha^8..alpha^14, alpha^253, alpha^254 as constants.
  localparam int NT = 9;
  localparam int unsigned TP [NT] = '{8, 9, 10, 11, 12, 13, 14, 253, 254};
  localparam byte unsigned TV [NT] = '{29, 58, 116, 232, 205, 135, 19, 71, 142};
  logic [7:0] yt [NT];
  for (genvar k = 0; k < NT; k++) begin : g_tab
    syndrome_block #(.ROOT(TP[k])) dut (.s(s), .r(r), .s_next(yt[k]));
  end

  task automatic check(string name, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: s=%0d r=%0d got %0d expected %0d", name, s, r, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned ex [8] = '{8, 16, 32, 64, 128, 29, 58, 116};
    r = 0;
    for (int i = 0; i < 8; i++) begin
      s = 8'(1 << i); #1;
      check("S3 example", y3, ex[i]);
    end
    for (int v = 0; v < 256; v++) begin
      s = 8'(v); r = 8'($urandom); #1;
      check("S1",  y1,  ref_mul(ref_pow(2, 1),  s) ^ r);
      check("S3",  y3,  ref_mul(ref_pow(2, 3),  s) ^ r);
      check("S17", y17, ref_mul(ref_pow(2, 17), s) ^ r);
      check("S32", y32, ref_mul(ref_pow(2, 32), s) ^ r);
    end
    // Table values of the syndrome constants: alpha^17 = 152, alpha^32 = 157.
    r = 0; s = 1; #1;
    check("alpha^17", y17, 8'd152);
    check("alpha^32", y32, 8'd157);
    for (int k = 0; k < NT; k++) check($sformatf("alpha^%0d", TP[k]), yt[k], TV[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
