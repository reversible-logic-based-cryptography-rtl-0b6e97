// tb_random_key_gen: checks the key generator at its default size.
//  - reset loads the seed; the key holds while `next` is low;
//  - each step matches an independently written LFSR step;
//  - after 2^16 - 1 steps the key sequence is back at its start;
//  - every one of the 16 key values appears, each about 1/16 of the time.
module tb_random_key_gen;
  import rlgcd_pkg::*;
  import rlgcd_ref_pkg::*;
  localparam logic [15:0] SEED = 16'hACE1;  // the default seed

  logic clk = 1'b0, rst_n = 1'b0, next = 1'b0;
  key_t key;
  int checks = 0, failures = 0;
  int hist [16];
  logic [15:0] model;

  random_key_gen dut (.clk(clk), .rst_n(rst_n), .next(next), .key(key));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[n]) hist[n] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    model = SEED;
    checks++;
    if (key !== SEED[3:0]) begin
      failures++;
      $display("FAIL reset key %b", key);
    end
    // hold
    repeat (5) @(negedge clk);
    checks++;
    if (key !== SEED[3:0]) begin
      failures++;
      $display("FAIL key moved without next");
    end
    // full period
    next = 1'b1;
    for (int n = 1; n <= 65535; n++) begin
      @(negedge clk);
      model = lfsr16_step(model);
      hist[key]++;
      if (key !== model[3:0]) begin
        checks++;
        failures++;
        if (failures < 10) $display("FAIL step %0d key %b exp %b", n, key, model[3:0]);
      end
    end
    // the model is back at the seed after a full period, so the key must be too
    checks++;
    if (model !== SEED || key !== SEED[3:0]) begin
      failures++;
      $display("FAIL key after 65535 steps %b", key);
    end
    foreach (hist[n]) begin
      checks++;
      if (hist[n] < 4000 || hist[n] > 4200) begin
        failures++;
        $display("FAIL key %0d seen %0d times", n, hist[n]);
      end
    end
    // reset again mid-sequence
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    checks++;
    if (key !== SEED[3:0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_random_key_gen
