// tb_rs255_detect_top -- end-to-end test of the encode-and-detect chain at
// its full size (223 message bytes, 32 parity bytes, 32 syndromes).
//
// Each block: 223 message bytes with shift low, then 32 parity bytes with
// shift high, one per enabled clock, with an error pattern applied to chosen
// bytes on the way to the syndrome calculator. The transmitted bytes are
// compared with a reference codeword, the received bytes with codeword plus
// error, and after the block the 32 syndromes and error_detected with the
// reference r(alpha^i). The run covers, and counts, each mechanism: message
// phase, parity shift-out, idle cycles, a clean word (all syndromes zero), a
// word with errors (some syndrome nonzero, in message and in parity bytes),
// the all-ones message, and an asynchronous clear between blocks. A mechanism
// that never happens counts as a failure. A block must take 255 enabled cycles.
module tb_rs255_detect_top;
  import rs_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, clrn = 0, enable = 0, first = 0, shift = 0;
  logic [7:0] msg_in = 0, err_pattern = 0, code_out, rx_byte;
  logic [7:0] syndromes [32];
  logic error_detected;

  int n_msg = 0, n_par = 0, n_idle = 0, n_clean = 0, n_detect = 0;
  int n_err_msg = 0, n_err_par = 0, n_ones = 0, n_clear = 0;

  always #5 clk = ~clk;

  rs255_detect_top dut (
    .clk(clk), .clrn(clrn), .enable(enable), .first(first), .shift(shift),
    .msg_in(msg_in), .err_pattern(err_pattern), .code_out(code_out),
    .rx_byte(rx_byte), .syndromes(syndromes), .error_detected(error_detected)
  );

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_block(sym_t msg [223], sym_t err [255], bit gaps);
    cw_t c = ref_encode(msg);
    cw_t r;
    syn_t exp;
    bit any = 0;
    int en_cycles = 0;
    for (int j = 0; j < 255; j++) r[j] = c[j] ^ err[j];
    exp = ref_syndromes(r);
    for (int j = 0; j < 255; j++) begin
      if (gaps && ($urandom % 5 == 0)) begin
        @(negedge clk); enable = 0; first = $urandom; shift = $urandom;
        msg_in = 8'($urandom); err_pattern = 8'($urandom);
        n_idle++;
      end
      @(negedge clk);
      enable = 1; first = (j == 0); shift = (j >= 223);
      msg_in = (j < 223) ? msg[j] : 8'($urandom); err_pattern = err[j];
      #1;
      chk(code_out === c[j], $sformatf("code byte %0d: %0d vs %0d", j, code_out, c[j]));
      chk(rx_byte === r[j], $sformatf("rx byte %0d", j));
      if (j < 223) n_msg++; else n_par++;
      if (err[j] != 0 && j < 223) n_err_msg++;
      if (err[j] != 0 && j >= 223) n_err_par++;
      @(posedge clk); en_cycles++;
    end
    @(negedge clk); enable = 0; first = 0; shift = 0; err_pattern = 0;
    chk(en_cycles == 255, "block length");
    for (int i = 0; i < 32; i++) begin
      any |= (exp[i] != 0);
      chk(syndromes[i] === exp[i], $sformatf("S%0d = %0d expected %0d", i+1, syndromes[i], exp[i]));
    end
    chk(error_detected === any, "error_detected");
    if (any) n_detect++; else n_clean++;
  endtask

  initial begin
    sym_t msg [223];
    sym_t err [255];
    repeat (2) @(posedge clk);
    @(negedge clk) clrn = 1;

    // all-ones message over a clean channel
    foreach (msg[j]) msg[j] = 1;
    foreach (err[j]) err[j] = 0;
    run_block(msg, err, 0); n_ones++;
    // the same message with one corrupted message byte
    err[100] = 8'h5A;
    run_block(msg, err, 1); n_ones++;
    for (int b = 0; b < 8; b++) begin
      foreach (msg[j]) msg[j] = 8'($urandom);
      foreach (err[j]) err[j] = 0;
      if (b % 2 == 1)
        for (int e = 0; e < b * 2; e++) err[$urandom % 255] = 8'(1 + $urandom % 255);
      if (b == 3) err[240] = 8'h01;           // an error in a parity byte
      if (b == 4) begin                        // clear in the middle of the block
        for (int j = 0; j < 40; j++) begin
          @(negedge clk); enable = 1; first = (j == 0); shift = 0;
          msg_in = 8'($urandom); err_pattern = 8'($urandom);
        end
        @(negedge clk); enable = 0; #1 clrn = 0; #1 clrn = 1;
        n_clear++;
        chk(error_detected === 1'b0, "syndromes cleared");
      end
      run_block(msg, err, b >= 4);
    end

    chk(n_msg > 0, "message phase");
    chk(n_par > 0, "parity phase");
    chk(n_idle > 0, "idle cycles");
    chk(n_clean > 0, "clean word");
    chk(n_detect > 0, "error detected");
    chk(n_err_msg > 0, "error in message byte");
    chk(n_err_par > 0, "error in parity byte");
    chk(n_ones > 0, "all-ones message");
    chk(n_clear > 0, "asynchronous clear");
    $display("message bytes %0d, parity bytes %0d, idle cycles %0d", n_msg, n_par, n_idle);
    $display("clean words %0d, words flagged %0d, clears %0d", n_clean, n_detect, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
