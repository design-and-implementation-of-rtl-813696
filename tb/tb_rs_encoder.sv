// tb_rs_encoder -- self-checking test of the RS(255,223) LFSR encoder.
//
// Encodes, back to back and without clearing in between: the all-ones
// message (its codeword is 255 ones, since the all-ones word is a multiple of
// g(x)), the all-zero message, a message with a single nonzero byte, and
// random messages, some of them with idle (enable low) cycles inserted. Each
// output byte is compared with a reference codeword from polynomial long
// division. One block must take exactly 255 enabled cycles, and the parity
// register must be empty again after the 32 shift-out cycles. The generator
// coefficients of the shared package are compared with g(x) multiplied out
// from its roots.
module tb_rs_encoder;
  import rs_ref_pkg::*;
  import gf256_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, clrn = 0, enable = 0, shift = 0;
  logic [7:0] u = 0, y;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  rs_encoder dut (.clk(clk), .clrn(clrn), .enable(enable), .shift(shift), .u(u), .y(y));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encode_block(sym_t msg [223], bit gaps);
    cw_t exp = ref_encode(msg);
    int en_cycles = 0;
    for (int j = 0; j < 255; j++) begin
      if (gaps && ($urandom % 4 == 0)) begin
        @(negedge clk); enable = 0; shift = $urandom; u = 8'($urandom);
      end
      @(negedge clk);
      enable = 1; shift = (j >= 223); u = (j < 223) ? msg[j] : 8'($urandom);
      #1;
      checks++;
      if (y !== exp[j]) begin
        failures++;
        $display("byte %0d: got %0d expected %0d", j, y, exp[j]);
      end
      @(posedge clk); en_cycles++;
    end
    @(negedge clk); enable = 0; shift = 0;
    checks++;
    if (en_cycles != RS_N) begin failures++; $display("block took %0d cycles", en_cycles); end
  endtask

  initial begin
    sym_t msg [223];
    gen_t g = ref_gen();
    for (int k = 0; k <= 32; k++) begin
      checks++;
      if (RS_GEN[k] !== g[k]) begin failures++; $display("g%0d = %0d, expected %0d", k, RS_GEN[k], g[k]); end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) clrn = 1;

    foreach (msg[j]) msg[j] = 1;
    encode_block(msg, 0);
    begin
      cw_t e;
      e = ref_encode(msg);
      for (int j = 223; j < 255; j++) begin
        checks++;
        if (e[j] != 1) begin failures++; $display("reference parity %0d not 1", j); end
      end
    end
    // register must be empty: an all-zero message gives an all-zero word
    foreach (msg[j]) msg[j] = 0;
    encode_block(msg, 0);
    foreach (msg[j]) msg[j] = 0;
    msg[222] = 8'd1;   // m(x) = 1: parity is g(x) - x^32 reduced, i.e. g0..g31
    encode_block(msg, 0);
    for (int b = 0; b < 6; b++) begin
      foreach (msg[j]) msg[j] = 8'($urandom);
      encode_block(msg, b[0]);
    end
    // asynchronous clear mid-block empties the register
    foreach (msg[j]) msg[j] = 8'($urandom);
    for (int j = 0; j < 50; j++) begin
      @(negedge clk); enable = 1; shift = 0; u = msg[j];
    end
    @(negedge clk); enable = 0; #1 clrn = 0; #1 clrn = 1;
    encode_block(msg, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
