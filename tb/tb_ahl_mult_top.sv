// End-to-end self-checking testbench of ahl_mult_top at its default size
// (64 x 64). Operations are offered with random gaps; multiplicands are
// drawn with zero counts around the judging thresholds so that both one-
// and two-cycle operations occur, and the aging input is switched during
// the run. A scoreboard records each accepted operation, computes its
// product with the * operator and its expected latency from its zero count
// and the aging input seen in its first cycle (one cycle if zeros >= 32, or
// >= 33 when aged), and checks product, out_long, hold and the cycle on
// which out_valid arrives. Every mechanism (short operation, long
// operation, a decision changed by aging, back-to-back acceptance, idle
// cycles, bypassed and non-bypassed multiplicands) must occur at least once.
module tb_ahl_mult_top;
  localparam int NOPS = 3000;

  logic           clk = 1'b0;
  logic           rst;
  logic           aging;
  logic           in_valid;
  logic           in_ready;
  logic [63:0]    md, mr;
  logic           out_valid, out_long, hold;
  logic [127:0]   product;
  logic [63:0]    p1, p2, p3, p4;

  ahl_mult_top u_dut (
    .clk(clk), .rst(rst), .aging(aging), .in_valid(in_valid),
    .in_ready(in_ready), .md(md), .mr(mr), .out_valid(out_valid),
    .out_long(out_long), .product(product), .hold(hold),
    .p1(p1), .p2(p2), .p3(p3), .p4(p4)
  );

  always #5 clk = ~clk;

  typedef struct {
    logic [63:0]  md;
    logic [63:0]  mr;
    int           acc_cycle;   // posedge on which it was accepted
    logic         aged;        // aging input during its first cycle
  } op_t;

  op_t q[$];
  int  cycle = 0;
  int  checks = 0, failures = 0;
  int  accepted = 0, completed = 0;
  int  n_short = 0, n_long = 0, n_aging_changed = 0, n_b2b = 0, n_idle = 0;
  int  n_bypass = 0, n_nobypass = 0, n_hold = 0;
  int  last_acc = -10;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int zeros_of(input logic [63:0] v);
    return 64 - $countones(v);
  endfunction

  function automatic logic expect_long(input op_t o);
    int z = zeros_of(o.md);
    return o.aged ? (z < 33) : (z < 32);
  endfunction

  function automatic logic [63:0] gen_md(input int n);
    logic [63:0] v;
    int k;
    if (n == 0) return '1;
    if (n == 1) return '0;
    if (n == 2) return 64'h7FFF_FFFF_FFFF_FFFF;
    k = 28 + int'($urandom_range(8, 0));   // zero counts 28..36
    v = '1;
    for (int placed = 0; placed < k; ) begin
      int pos = int'($urandom_range(63, 0));
      if (v[pos]) begin
        v[pos] = 1'b0;
        placed++;
      end
    end
    return v;
  endfunction

  initial begin
    repeat (20 * NOPS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gen;
    gen = 0;
    rst = 1'b1; aging = 1'b0; in_valid = 1'b0; md = '0; mr = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (completed < NOPS) begin
      @(negedge clk);
      // Outputs of the edge just passed.
      if (out_valid) begin
        op_t o;
        logic lng;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL: out_valid with no operation outstanding");
        end else begin
          o = q.pop_front();
          lng = expect_long(o);
          if (product !== 128'(o.md) * 128'(o.mr) || out_long !== lng ||
              cycle - o.acc_cycle != (lng ? 2 : 1)) begin
            failures++;
            if (failures < 10)
              $display("FAIL op md=%h mr=%h: got %h long=%0d after %0d cycles",
                       o.md, o.mr, product, out_long, cycle - o.acc_cycle);
          end
          if (lng) n_long++; else n_short++;
          if (expect_long('{md: o.md, mr: o.mr, acc_cycle: 0, aged: !o.aged}) != lng)
            n_aging_changed++;
          if (zeros_of(o.md) != 0) n_bypass++; else n_nobypass++;
          completed++;
        end
      end
      // Aging input: switched every 500 cycles.
      aging = ((cycle / 500) % 2) == 1;
      #1;
      // The operation accepted on the edge just passed is in its first cycle.
      if (q.size() > 0 && q[$].acc_cycle == cycle) begin
        q[$].aged = aging;
        checks++;
        if (hold !== expect_long(q[$])) begin
          failures++;
          $display("FAIL hold=%0d for md=%h aged=%0d", hold, q[$].md, aging);
        end
        if (hold) n_hold++;
      end
      // Offer a new operation with probability 3/4.
      if (gen < NOPS && ($urandom_range(3, 0) != 0)) begin
        in_valid = 1'b1;
        md = gen_md(gen);
        mr = {$urandom, $urandom};
      end else begin
        in_valid = 1'b0;
        md = {$urandom, $urandom};
        mr = {$urandom, $urandom};
        n_idle++;
      end
      #1;
      if (in_valid && in_ready) begin
        q.push_back('{md: md, mr: mr, acc_cycle: cycle + 1, aged: 1'b0});
        if (last_acc == cycle) n_b2b++;
        last_acc = cycle + 1;
        accepted++;
        gen++;
      end
    end
    @(negedge clk);
    checks++;
    if (out_valid || q.size() != 0) begin
      failures++;
      $display("FAIL: spurious or missing result at end");
    end
    $display("short=%0d long=%0d aging_changed=%0d back_to_back=%0d idle=%0d bypassed=%0d not_bypassed=%0d hold=%0d",
             n_short, n_long, n_aging_changed, n_b2b, n_idle, n_bypass, n_nobypass, n_hold);
    if (n_short == 0 || n_long == 0 || n_aging_changed == 0 || n_b2b == 0 ||
        n_idle == 0 || n_bypass == 0 || n_nobypass == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
