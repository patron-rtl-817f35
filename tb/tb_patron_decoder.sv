// tb_patron_decoder: exhaustive self-checking test of the code -> state
// decode.
//
// Applies every 4-bit code to the default decoder (n = 4, x = 1, sensitive
// codes 0000, 0011, normal codes 0101, 0110, 1001, 1010) and every 5-bit code
// to an n = 5, x = 2 decoder (sensitive 00000, 00111, normal 11001, 11010,
// 11011). Codebook members must return their index, code_valid and the right
// sensitive flag; every other code must return the safe normal state
// (index 2) with code_valid and is_sensitive low. The expected codebooks are
// written out by hand.
module tb_patron_decoder;

  int checks   = 0;
  int failures = 0;

  logic [3:0] code_a;
  logic [2:0] idx_a;
  logic       sens_a, valid_a;
  patron_decoder dut_a (.code(code_a), .state_idx(idx_a),
                        .is_sensitive(sens_a), .code_valid(valid_a));

  logic [4:0] code_b;
  logic [2:0] idx_b;
  logic       sens_b, valid_b;
  patron_decoder #(.N_BITS(5), .X_FLIPS(2), .NUM_SS(2), .NUM_NS(3)) dut_b (
    .code(code_b), .state_idx(idx_b), .is_sensitive(sens_b), .code_valid(valid_b));

  logic [3:0] book_a [6] = '{4'b0000, 4'b0011, 4'b0101, 4'b0110, 4'b1001, 4'b1010};
  logic [4:0] book_b [5] = '{5'b00000, 5'b00111, 5'b11001, 5'b11010, 5'b11011};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx;
    for (int c = 0; c < 16; c++) begin
      code_a = 4'(c);
      #1;
      exp_idx = -1;
      for (int i = 0; i < 6; i++) if (book_a[i] == 4'(c)) exp_idx = i;
      if (exp_idx >= 0) begin
        check(valid_a && int'(idx_a) == exp_idx && sens_a == (exp_idx < 2),
              $sformatf("A code %b -> idx %0d v%0d s%0d", code_a, idx_a, valid_a, sens_a));
      end else begin
        check(!valid_a && idx_a == 3'd2 && !sens_a,
              $sformatf("A unused %b -> idx %0d v%0d s%0d", code_a, idx_a, valid_a, sens_a));
      end
    end
    for (int c = 0; c < 32; c++) begin
      code_b = 5'(c);
      #1;
      exp_idx = -1;
      for (int i = 0; i < 5; i++) if (book_b[i] == 5'(c)) exp_idx = i;
      if (exp_idx >= 0) begin
        check(valid_b && int'(idx_b) == exp_idx && sens_b == (exp_idx < 2),
              $sformatf("B code %b -> idx %0d v%0d s%0d", code_b, idx_b, valid_b, sens_b));
      end else begin
        check(!valid_b && idx_b == 3'd2 && !sens_b,
              $sformatf("B unused %b -> idx %0d v%0d s%0d", code_b, idx_b, valid_b, sens_b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
