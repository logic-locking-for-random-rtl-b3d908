// tb_key_gate: exhaustive check of the key-gate for all kinds and inputs,
// against a truth table written out by hand.
module tb_key_gate;
  import rf_pkg::*;

  gate_kind_t kind;
  logic din, key_bit, dout;
  int checks = 0, failures = 0;

  key_gate dut (.kind, .din, .key_bit, .dout);

  // expected[kind][din][key]
  localparam bit EXP_BUF  [2][2] = '{'{0, 0}, '{1, 1}};
  localparam bit EXP_XOR  [2][2] = '{'{0, 1}, '{1, 0}};
  localparam bit EXP_XNOR [2][2] = '{'{1, 0}, '{0, 1}};

  initial begin
    for (int k = 0; k < 3; k++) begin
      for (int d = 0; d < 2; d++) begin
        for (int b = 0; b < 2; b++) begin
          bit exp;
          kind    = gate_kind_t'(k);
          din     = d[0];
          key_bit = b[0];
          #1;
          exp = (k == 0) ? EXP_BUF[d][b] : (k == 1) ? EXP_XOR[d][b] : EXP_XNOR[d][b];
          checks++;
          if (dout !== exp) begin
            failures++;
            $display("FAIL kind=%0d din=%0d key=%0d dout=%0d exp=%0d", k, d, b, dout, exp);
          end
        end
      end
    end
    // With the key bit the locking step chose, XOR and XNOR both invert.
    for (int d = 0; d < 2; d++) begin
      kind = gate_for(1'b1, 1'b1); din = d[0]; key_bit = 1'b1; #1;
      checks++; if (dout !== ~d[0]) failures++;
      kind = gate_for(1'b1, 1'b0); din = d[0]; key_bit = 1'b0; #1;
      checks++; if (dout !== ~d[0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
