// tb_lf_adder: self-checking test of the three-stage Ladner-Fischer adder.
// Instances at 4 and 8 bits are tested exhaustively (all a, b, cin); the
// 16-bit and default 32-bit instances with corner and random operands.
// The expected {cout, sum} is a + b + cin computed with 64-bit integer
// arithmetic.
module tb_lf_adder;
  logic [3:0]  a4, b4, s4;   logic ci4, co4;
  logic [7:0]  a8, b8, s8;   logic ci8, co8;
  logic [15:0] a16, b16, s16; logic ci16, co16;
  logic [31:0] a32, b32, s32; logic ci32, co32;
  int checks = 0, failures = 0;

  lf_adder #(.N(4))  dut4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(co4));
  lf_adder #(.N(8))  dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  lf_adder #(.N(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  lf_adder           dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string tag, input longint unsigned got,
                     input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", tag, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << 9); v++) begin
      {ci4, a4, b4} = 9'(v);
      #1;
      cmp("N4", 64'({co4, s4}), longint'(a4) + longint'(b4) + longint'(ci4));
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {ci8, a8, b8} = 17'(v);
      #1;
      cmp("N8", 64'({co8, s8}), longint'(a8) + longint'(b8) + longint'(ci8));
    end
    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom()); b16 = 16'($urandom()); ci16 = 1'($urandom());
      a32 = $urandom(); b32 = $urandom(); ci32 = 1'($urandom());
      case (t)
        0: begin a16 = '1; b16 = '0; ci16 = 1'b1; a32 = '1; b32 = '0; ci32 = 1'b1; end
        1: begin a16 = '1; b16 = '1; ci16 = 1'b1; a32 = '1; b32 = '1; ci32 = 1'b1; end
        2: begin a16 = '0; b16 = '0; ci16 = 1'b0; a32 = '0; b32 = '0; ci32 = 1'b0; end
        3: begin a16 = 16'h8000; b16 = 16'h8000; ci16 = 1'b0;
                 a32 = 32'h8000_0000; b32 = 32'h8000_0000; ci32 = 1'b0; end
        default: ;
      endcase
      #1;
      cmp("N16", 64'({co16, s16}), longint'(a16) + longint'(b16) + longint'(ci16));
      cmp("N32", 64'({co32, s32}), longint'(a32) + longint'(b32) + longint'(ci32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
