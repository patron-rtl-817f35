// tb_patron_workloads: the benchmark configurations of the PATRON evaluation
// run against patron_fsm.
//
// Five controllers (AES: 2 sensitive + 3 normal states, SHA-256: 3 + 4,
// RSA: 4 + 3, MIPS: 5 + 14, memory controller: 8 + 58), each protected
// against x = 1, 2 and 3 simultaneous flips. The code width of each instance
// is the smallest for which this design's codebook construction finds all
// states; the printed code rate k/n (k = binary width) can be set against
// the published figures. Each instance runs a full fault campaign
// (patron_campaign): codebook rules, vulnerability metric 0, and every
// pattern of up to x flips from every state. The controllers' own next-state
// logic is not modelled; the campaign drives the logical next state itself.
// Faults that only move between normal states (allowed by the scheme) and
// faults into unused codes must both occur somewhere.
module tb_patron_workloads;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks    = 0;
  int failures  = 0;
  int to_ns     = 0;
  int to_unused = 0;

  patron_campaign #(.N_BITS(4), .X_FLIPS(1), .NUM_SS(2), .NUM_NS(3), .NAME("aes x=1"))
    u_aes_x1 (.clk(clk));
  patron_campaign #(.N_BITS(5), .X_FLIPS(2), .NUM_SS(2), .NUM_NS(3), .NAME("aes x=2"))
    u_aes_x2 (.clk(clk));
  patron_campaign #(.N_BITS(6), .X_FLIPS(3), .NUM_SS(2), .NUM_NS(3), .NAME("aes x=3"))
    u_aes_x3 (.clk(clk));
  patron_campaign #(.N_BITS(4), .X_FLIPS(1), .NUM_SS(3), .NUM_NS(4), .NAME("sha256 x=1"))
    u_sha256_x1 (.clk(clk));
  patron_campaign #(.N_BITS(6), .X_FLIPS(2), .NUM_SS(3), .NUM_NS(4), .NAME("sha256 x=2"))
    u_sha256_x2 (.clk(clk));
  patron_campaign #(.N_BITS(7), .X_FLIPS(3), .NUM_SS(3), .NUM_NS(4), .NAME("sha256 x=3"))
    u_sha256_x3 (.clk(clk));
  patron_campaign #(.N_BITS(4), .X_FLIPS(1), .NUM_SS(4), .NUM_NS(3), .NAME("rsa x=1"))
    u_rsa_x1 (.clk(clk));
  patron_campaign #(.N_BITS(7), .X_FLIPS(2), .NUM_SS(4), .NUM_NS(3), .NAME("rsa x=2"))
    u_rsa_x2 (.clk(clk));
  patron_campaign #(.N_BITS(7), .X_FLIPS(3), .NUM_SS(4), .NUM_NS(3), .NAME("rsa x=3"))
    u_rsa_x3 (.clk(clk));
  patron_campaign #(.N_BITS(5), .X_FLIPS(1), .NUM_SS(5), .NUM_NS(14), .NAME("mips x=1"))
    u_mips_x1 (.clk(clk));
  patron_campaign #(.N_BITS(9), .X_FLIPS(2), .NUM_SS(5), .NUM_NS(14), .NAME("mips x=2"))
    u_mips_x2 (.clk(clk));
  patron_campaign #(.N_BITS(8), .X_FLIPS(3), .NUM_SS(5), .NUM_NS(14), .NAME("mips x=3"))
    u_mips_x3 (.clk(clk));
  patron_campaign #(.N_BITS(7), .X_FLIPS(1), .NUM_SS(8), .NUM_NS(58), .NAME("memctrl x=1"))
    u_memctrl_x1 (.clk(clk));
  patron_campaign #(.N_BITS(9), .X_FLIPS(2), .NUM_SS(8), .NUM_NS(58), .NAME("memctrl x=2"))
    u_memctrl_x2 (.clk(clk));
  patron_campaign #(.N_BITS(9), .X_FLIPS(3), .NUM_SS(8), .NUM_NS(58), .NAME("memctrl x=3"))
    u_memctrl_x3 (.clk(clk));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u_aes_x1.run();
    checks += u_aes_x1.checks; failures += u_aes_x1.failures; to_ns += u_aes_x1.n_fault_to_ns; to_unused += u_aes_x1.n_fault_to_unused;
    u_aes_x2.run();
    checks += u_aes_x2.checks; failures += u_aes_x2.failures; to_ns += u_aes_x2.n_fault_to_ns; to_unused += u_aes_x2.n_fault_to_unused;
    u_aes_x3.run();
    checks += u_aes_x3.checks; failures += u_aes_x3.failures; to_ns += u_aes_x3.n_fault_to_ns; to_unused += u_aes_x3.n_fault_to_unused;
    u_sha256_x1.run();
    checks += u_sha256_x1.checks; failures += u_sha256_x1.failures; to_ns += u_sha256_x1.n_fault_to_ns; to_unused += u_sha256_x1.n_fault_to_unused;
    u_sha256_x2.run();
    checks += u_sha256_x2.checks; failures += u_sha256_x2.failures; to_ns += u_sha256_x2.n_fault_to_ns; to_unused += u_sha256_x2.n_fault_to_unused;
    u_sha256_x3.run();
    checks += u_sha256_x3.checks; failures += u_sha256_x3.failures; to_ns += u_sha256_x3.n_fault_to_ns; to_unused += u_sha256_x3.n_fault_to_unused;
    u_rsa_x1.run();
    checks += u_rsa_x1.checks; failures += u_rsa_x1.failures; to_ns += u_rsa_x1.n_fault_to_ns; to_unused += u_rsa_x1.n_fault_to_unused;
    u_rsa_x2.run();
    checks += u_rsa_x2.checks; failures += u_rsa_x2.failures; to_ns += u_rsa_x2.n_fault_to_ns; to_unused += u_rsa_x2.n_fault_to_unused;
    u_rsa_x3.run();
    checks += u_rsa_x3.checks; failures += u_rsa_x3.failures; to_ns += u_rsa_x3.n_fault_to_ns; to_unused += u_rsa_x3.n_fault_to_unused;
    u_mips_x1.run();
    checks += u_mips_x1.checks; failures += u_mips_x1.failures; to_ns += u_mips_x1.n_fault_to_ns; to_unused += u_mips_x1.n_fault_to_unused;
    u_mips_x2.run();
    checks += u_mips_x2.checks; failures += u_mips_x2.failures; to_ns += u_mips_x2.n_fault_to_ns; to_unused += u_mips_x2.n_fault_to_unused;
    u_mips_x3.run();
    checks += u_mips_x3.checks; failures += u_mips_x3.failures; to_ns += u_mips_x3.n_fault_to_ns; to_unused += u_mips_x3.n_fault_to_unused;
    u_memctrl_x1.run();
    checks += u_memctrl_x1.checks; failures += u_memctrl_x1.failures; to_ns += u_memctrl_x1.n_fault_to_ns; to_unused += u_memctrl_x1.n_fault_to_unused;
    u_memctrl_x2.run();
    checks += u_memctrl_x2.checks; failures += u_memctrl_x2.failures; to_ns += u_memctrl_x2.n_fault_to_ns; to_unused += u_memctrl_x2.n_fault_to_unused;
    u_memctrl_x3.run();
    checks += u_memctrl_x3.checks; failures += u_memctrl_x3.failures; to_ns += u_memctrl_x3.n_fault_to_ns; to_unused += u_memctrl_x3.n_fault_to_unused;
    checks++;
    if (to_ns == 0) begin
      failures++;
      $display("FAIL: no fault moved between normal states");
    end
    checks++;
    if (to_unused == 0) begin
      failures++;
      $display("FAIL: no fault reached an unused code");
    end
    $display("faults between normal states=%0d, into unused codes=%0d", to_ns, to_unused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
