// Self-checking testbench of mult64 at its default size (64 x 64 from four
// 32 x 32 column-bypassing arrays). Checks the 128-bit product against the *
// operator and each sub-product p1..p4 against the product of its operand
// halves, on corner cases and random operands of varied density.
module tb_mult64;
  int checks = 0, failures = 0;
  logic [63:0]  md, mr;
  logic [127:0] product;
  logic [63:0]  p1, p2, p3, p4;

  mult64 u_dut (.md(md), .mr(mr), .product(product),
                .p1(p1), .p2(p2), .p3(p3), .p4(p4));

  task automatic check(input logic [63:0] x, input logic [63:0] y);
    md = x; mr = y; #1;
    checks++;
    if (product !== 128'(x) * 128'(y) ||
        p1 !== 64'(x[31:0])  * 64'(y[31:0]) ||
        p2 !== 64'(x[63:32]) * 64'(y[31:0]) ||
        p3 !== 64'(x[31:0])  * 64'(y[63:32]) ||
        p4 !== 64'(x[63:32]) * 64'(y[63:32])) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h got %h", x, y, product);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, 64'h1);
    check(64'h7FFF_FFFF_FFFF_FFFF, 64'h6464_6464_6464_6464);
    check(64'hFFFF_FFFF_0000_0000, 64'h0000_0000_FFFF_FFFF);
    for (int n = 0; n < 3000; n++) begin
      logic [63:0] x, y;
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      if (n % 3 == 1) x = x & {$urandom, $urandom};
      if (n % 3 == 2) x = x | {$urandom, $urandom};
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
