// tb_scl_gate: exhaustive check of the 4x4 SCL gate.
// All 16 inputs are applied; each output is compared with a truth table
// written out by hand, and the 16 outputs must all differ (reversibility).
// Applying the expected output again must give back the input.
module tb_scl_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  scl_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  // S for input index {a,b,c,d}: d is inverted unless a=b=c=0.
  localparam logic [15:0] S_TABLE = 16'b0101_0101_0101_0110; // bit n = S for input n

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int n = 0; n < 16; n++) begin
      {a, b, c, d} = 4'(n);
      #1;
      checks++;
      if ({p, q, r} !== {a, b, c} || s !== S_TABLE[n]) begin
        failures++;
        $display("FAIL scl in=%b out=%b%b%b%b", 4'(n), p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL scl output %b repeated", {p, q, r, s});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    // self-inverse: feed each output back in
    for (int n = 0; n < 16; n++) begin
      {a, b, c, d} = {4'(n)};
      #1;
      {a, b, c, d} = {p, q, r, s};
      #1;
      checks++;
      if ({p, q, r, s} !== 4'(n)) begin
        failures++;
        $display("FAIL scl not self-inverse for %b", 4'(n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_scl_gate
