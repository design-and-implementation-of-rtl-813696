// tb_syndrome -- self-checking test of the 32-register syndrome calculator.
//
// Feeds reference codewords (all-ones, random) and checks that all 32
// syndromes are zero and nonzero stays low; then feeds words with one to
// sixteen random byte errors and compares every syndrome with the direct
// evaluation r(alpha^i), expecting nonzero high. Blocks follow each other
// without a clear: init on the first byte restarts the sums. Some blocks
// have idle cycles inserted. The syndromes must be valid the cycle after the
// 255th accepted byte. Finally the 32 parity bytes of the all-ones message
// are fed alone, a block of only 32 bytes, whose syndromes are nonzero.
module tb_syndrome;
  import rs_ref_pkg::*;
  import gf256_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, clrn = 0, enable = 0, init = 0;
  logic [7:0] u = 0;
  logic [7:0] s [32];
  logic nonzero;
  int n_clean = 0, n_err = 0;

  always #5 clk = ~clk;

  syndrome dut (.clk(clk), .clrn(clrn), .enable(enable), .init(init), .u(u), .s(s), .nonzero(nonzero));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(sym_t r [], bit gaps);
    int n = r.size();
    cw_t full;
    syn_t exp;
    bit any = 0;
    for (int j = 0; j < 255; j++) full[j] = 0;
    for (int j = 0; j < n; j++) full[255-n+j] = r[j];
    exp = ref_syndromes(full);
    for (int j = 0; j < n; j++) begin
      if (gaps && ($urandom % 3 == 0)) begin
        @(negedge clk); enable = 0; init = $urandom; u = 8'($urandom);
      end
      @(negedge clk); enable = 1; init = (j == 0); u = r[j];
    end
    @(negedge clk); enable = 0; init = 0; u = 8'($urandom);
    for (int i = 0; i < 32; i++) begin
      checks++;
      any |= (exp[i] != 0);
      if (s[i] !== exp[i]) begin failures++; $display("S%0d = %0d expected %0d", i+1, s[i], exp[i]); end
    end
    checks++;
    if (nonzero !== any) begin failures++; $display("nonzero = %0b expected %0b", nonzero, any); end
    if (any) n_err++; else n_clean++;
  endtask

  initial begin
    sym_t msg [223];
    sym_t r [];
    cw_t c;
    repeat (2) @(posedge clk);
    @(negedge clk) clrn = 1;

    foreach (msg[j]) msg[j] = 1;
    c = ref_encode(msg);
    r = new[255]; foreach (r[j]) r[j] = c[j];
    feed(r, 0);
    for (int b = 0; b < 6; b++) begin
      foreach (msg[j]) msg[j] = 8'($urandom);
      c = ref_encode(msg);
      foreach (r[j]) r[j] = c[j];
      feed(r, b[0]);
      // same word with 1..16 random byte errors
      for (int e = 0; e < 1 + (b * 3); e++) r[$urandom % 255] ^= 8'(1 + ($urandom % 255));
      feed(r, !b[0]);
    end
    // parity bytes of the all-ones message on their own
    r = new[32]; foreach (r[j]) r[j] = 1;
    feed(r, 0);
    checks++;
    if (!nonzero) begin failures++; $display("parity-only block not flagged"); end
    checks++;
    if (n_clean == 0 || n_err == 0) begin failures++; $display("clean=%0d err=%0d", n_clean, n_err); end
    $display("clean blocks %0d, blocks with errors %0d", n_clean, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
