// Self-checking testbench of the adaptive hold logic at its default 64-bit
// width. Multiplicands with every zero count from 0 to 64 (bits placed at
// random) are judged with the aging input at 0 and at 1; the expected zero
// count comes from $countones and the expected decision from the default
// thresholds (32 zeros fresh, 33 zeros aged).
module tb_ahl;
  int checks = 0, failures = 0;
  logic [63:0] md;
  logic        aging;
  logic [6:0]  zeros;
  logic        one_cycle;

  ahl u_dut (.md(md), .aging(aging), .zeros(zeros), .one_cycle(one_cycle));

  function automatic logic [63:0] with_zeros(input int k);
    logic [63:0] v = '1;
    int placed = 0;
    while (placed < k) begin
      int pos = int'($urandom_range(63, 0));
      if (v[pos]) begin
        v[pos] = 1'b0;
        placed++;
      end
    end
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int k = 0; k <= 64; k++)
        for (int ag = 0; ag < 2; ag++) begin
          int nz;
          logic exp_one;
          md = with_zeros(k); aging = ag[0]; #1;
          nz = 64 - $countones(md);
          exp_one = (ag != 0) ? (nz >= 33) : (nz >= 32);
          checks++;
          if (zeros !== 7'(nz) || one_cycle !== exp_one) begin
            failures++;
            if (failures < 10)
              $display("FAIL md=%h aging=%0d zeros=%0d/%0d one_cycle=%0d/%0d",
                       md, ag, zeros, nz, one_cycle, exp_one);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
