// tb_patron_encoder: self-checking test of the state-index -> code lookup.
//
// Two instances: the default worked example (n = 4, x = 1, 2 sensitive and
// 4 normal states) and the n = 5, x = 2 codebook with 2 sensitive and 3
// normal states. Expected codes are written out by hand from the encoding
// rules (greedy in increasing value: sensitive codes a multiple of x+1 apart,
// normal codes more than x from every sensitive code). Every index, including
// out-of-range ones, is applied; the tb also re-checks the distance rules on
// the codes the DUT produces.
module tb_patron_encoder;

  int checks   = 0;
  int failures = 0;

  // Instance A: default parameters.
  logic [2:0] idx_a;
  logic [3:0] code_a;
  patron_encoder dut_a (.state_idx(idx_a), .code(code_a));

  // Instance B: n = 5, x = 2, |SS| = 2, |NS| = 3.
  logic [2:0] idx_b;
  logic [4:0] code_b;
  patron_encoder #(.N_BITS(5), .X_FLIPS(2), .NUM_SS(2), .NUM_NS(3)) dut_b (
    .state_idx(idx_b), .code(code_b));

  // Sensitive 0000, 0011; normal 0101, 0110, 1001, 1010; indices 6, 7 are
  // out of range and give the safe state (index 2, 0101).
  logic [3:0] exp_a [8] = '{4'b0000, 4'b0011, 4'b0101, 4'b0110,
                            4'b1001, 4'b1010, 4'b0101, 4'b0101};
  // Sensitive 00000, 00111; normal 11001, 11010, 11011; 5..7 -> index 2.
  logic [4:0] exp_b [8] = '{5'b00000, 5'b00111, 5'b11001, 5'b11010,
                            5'b11011, 5'b11001, 5'b11001, 5'b11001};

  logic [3:0] got_a [6];
  logic [4:0] got_b [5];

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
    for (int i = 0; i < 8; i++) begin
      idx_a = 3'(i);
      idx_b = 3'(i);
      #1;
      check(code_a === exp_a[i], $sformatf("A idx %0d code %b exp %b", i, code_a, exp_a[i]));
      check(code_b === exp_b[i], $sformatf("B idx %0d code %b exp %b", i, code_b, exp_b[i]));
      if (i < 6) got_a[i] = code_a;
      if (i < 5) got_b[i] = code_b;
    end
    // Distance rules on what the DUT produced.
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 2; j++)
        if (i != j) begin
          if (i < 2) check($countones(got_a[i] ^ got_a[j]) % 2 == 0,
                           $sformatf("A SS %0d/%0d distance", i, j));
          else       check($countones(got_a[i] ^ got_a[j]) > 1,
                           $sformatf("A NS %0d too close to SS %0d", i, j));
        end
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 2; j++)
        if (i != j) begin
          if (i < 2) check($countones(got_b[i] ^ got_b[j]) % 3 == 0,
                           $sformatf("B SS %0d/%0d distance", i, j));
          else       check($countones(got_b[i] ^ got_b[j]) > 2,
                           $sformatf("B NS %0d too close to SS %0d", i, j));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
