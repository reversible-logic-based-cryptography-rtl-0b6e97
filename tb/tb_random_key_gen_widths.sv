// tb_random_key_gen_widths: checks the other LFSR widths of the key
// generator. The 4- and 8-bit versions must return to their seed after
// exactly 2^n - 1 steps and not before. The 32-bit version must follow an
// independently written step for 1,000 steps.
module tb_random_key_gen_widths;
  import rlgcd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, next = 1'b0;
  key_t k4, k8, k32;
  int checks = 0, failures = 0;
  logic [31:0] m32;

  random_key_gen #(.LFSR_W(4),  .SEED(4'h1))         g4  (.clk(clk), .rst_n(rst_n), .next(next), .key(k4));
  random_key_gen #(.LFSR_W(8),  .SEED(8'h01))        g8  (.clk(clk), .rst_n(rst_n), .next(next), .key(k8));
  random_key_gen #(.LFSR_W(32), .SEED(32'h1234_5678)) g32 (.clk(clk), .rst_n(rst_n), .next(next), .key(k32));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first4, first8;
    first4 = 0;
    first8 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m32   = 32'h1234_5678;
    next  = 1'b1;
    for (int n = 1; n <= 1000; n++) begin
      @(negedge clk);
      // first return of the 4- and 8-bit states to their seeds
      if (first4 == 0 && g4.state == 4'h1) first4 = n;
      if (first8 == 0 && g8.state == 8'h01) first8 = n;
      m32 = {m32[30:0], m32[31] ^ m32[21] ^ m32[1] ^ m32[0]};
      checks++;
      if (k32 !== m32[3:0]) begin
        failures++;
        if (failures < 10) $display("FAIL 32-bit step %0d key %b exp %b", n, k32, m32[3:0]);
      end
    end
    checks++;
    if (first4 != 15) begin
      failures++;
      $display("FAIL 4-bit period %0d", first4);
    end
    checks++;
    if (first8 != 255) begin
      failures++;
      $display("FAIL 8-bit period %0d", first8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_random_key_gen_widths
