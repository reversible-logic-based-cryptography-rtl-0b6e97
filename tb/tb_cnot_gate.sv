// tb_cnot_gate: exhaustive check of the 2x2 CNOT (Feynman) gate against a
// hand-written truth table, and of its reversibility.
module tb_cnot_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  bit [3:0] seen;
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  cnot_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int n = 0; n < 4; n++) begin
      {a, b} = 2'(n);
      #1;
      checks++;
      if ({p, q} !== EXP[n]) begin
        failures++;
        $display("FAIL cnot in=%b out=%b exp=%b", 2'(n), {p, q}, EXP[n]);
      end
      checks++;
      if (seen[{p, q}]) failures++;
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_cnot_gate
