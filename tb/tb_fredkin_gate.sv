// tb_fredkin_gate: exhaustive check of the 3x3 Fredkin gate against a
// hand-written truth table; also checks that the number of ones is kept and
// that the 8 outputs are distinct.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                     3'b100, 3'b110, 3'b101, 3'b111};

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int n = 0; n < 8; n++) begin
      {a, b, c} = 3'(n);
      #1;
      checks++;
      if ({p, q, r} !== EXP[n]) begin
        failures++;
        $display("FAIL fredkin in=%b out=%b exp=%b", 3'(n), {p, q, r}, EXP[n]);
      end
      checks++;
      if ($countones({p, q, r}) != $countones(3'(n))) failures++;
      checks++;
      if (seen[{p, q, r}]) failures++;
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_fredkin_gate
