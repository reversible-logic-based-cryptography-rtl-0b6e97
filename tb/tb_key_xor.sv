// tb_key_xor: exhaustive check of the 4-bit key XOR stage (256 cases),
// each bit compared on its own, and a check that a second pass with the
// same key restores the data.
module tb_key_xor;
  import rlgcd_pkg::*;
  nibble_t x, y;
  key_t    k;
  int checks = 0, failures = 0;

  key_xor dut (.x(x), .k(k), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      {x, k} = 8'(n);
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (y[j] !== (x[j] != k[j])) begin
          failures++;
          $display("FAIL key_xor x=%b k=%b bit %0d", x, k, j);
        end
      end
      begin
        nibble_t y0;
        y0 = y;
        x  = y0;
        #1;
        checks++;
        if (y !== 4'(n >> 4)) begin
          failures++;
          $display("FAIL key_xor second pass x=%b k=%b", y0, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_key_xor
