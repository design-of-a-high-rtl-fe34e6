// Self-checking testbench of cb_mult. Runs the 4 x 4 array of the published
// circuit and an 8 x 8 array exhaustively, and the 32-bit default array on
// random and corner-case operands (zero, all ones, sparse multiplicands that
// bypass most diagonals). Expected products come from the * operator.
module tb_cb_mult;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic [7:0]  p4;
  logic [7:0]  a8, b8;   logic [15:0] p8;
  logic [31:0] a32, b32; logic [63:0] p32;

  cb_mult #(.N(4)) u4  (.a(a4),  .b(b4),  .p(p4));
  cb_mult #(.N(8)) u8  (.a(a8),  .b(b8),  .p(p8));
  cb_mult          u32 (.a(a32), .b(b32), .p(p32));

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    a32 = x; b32 = y; #1;
    checks++;
    if (p32 !== 64'(x) * 64'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL 32: %h * %h = %h, got %h", x, y, 64'(x) * 64'(y), p32);
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
    // 4 x 4, including the 1010 x 1111 example of the bypassing description.
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if (p4 !== 8'(i * j)) begin
          failures++;
          $display("FAIL 4: %0d * %0d got %0d", i, j, p4);
        end
      end
    a4 = 4'b1010; b4 = 4'b1111; #1;
    checks++;
    if (p4 !== 8'd150) failures++;
    // 8 x 8 exhaustive.
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        checks++;
        if (p8 !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 8: %0d * %0d got %0d", i, j, p8);
        end
      end
    // 32 x 32.
    check32('0, '0);
    check32('1, '1);
    check32('1, 32'h1);
    check32(32'h8000_0000, '1);
    for (int i = 0; i < 32; i++) check32(32'h1 << i, $urandom);
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] x;
      x = $urandom;
      if (n % 3 == 1) x = x & $urandom & $urandom;   // many zeros
      if (n % 3 == 2) x = x | $urandom | $urandom;   // few zeros
      check32(x, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
