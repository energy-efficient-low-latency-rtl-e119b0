// tb_signed_booth_multiplier: the multiplier core at the three sizes of the
// evaluation (4x4, 8x8, 16x16) and at a rectangular 8x6, in both row
// variants. 4x4, 8x6 and 8x8 are checked exhaustively, 16x16 with random
// operands plus the extreme values. Expected products come from integer
// multiplication of the signed operands.
module tb_signed_booth_multiplier;
  import booth_pkg::*;

  logic [3:0]  a4, b4;
  logic [7:0]  a8, b8;
  logic [5:0]  b6;
  logic [15:0] a16, b16;
  logic [7:0]  p4a, p4d;
  logic [13:0] p86a, p86d;
  logic [15:0] p8a, p8d;
  logic [31:0] p16a, p16d;
  int checks = 0, failures = 0;

  signed_booth_multiplier #(.N(4),  .M(4),  .VARIANT(PPG_AREA))  u4a  (.a(a4),  .b(b4),  .p(p4a));
  signed_booth_multiplier #(.N(4),  .M(4),  .VARIANT(PPG_DELAY)) u4d  (.a(a4),  .b(b4),  .p(p4d));
  signed_booth_multiplier #(.N(8),  .M(6),  .VARIANT(PPG_AREA))  u86a (.a(a8),  .b(b6),  .p(p86a));
  signed_booth_multiplier #(.N(8),  .M(6),  .VARIANT(PPG_DELAY)) u86d (.a(a8),  .b(b6),  .p(p86d));
  signed_booth_multiplier #(.N(8),  .M(8),  .VARIANT(PPG_AREA))  u8a  (.a(a8),  .b(b8),  .p(p8a));
  signed_booth_multiplier #(.N(8),  .M(8),  .VARIANT(PPG_DELAY)) u8d  (.a(a8),  .b(b8),  .p(p8d));
  signed_booth_multiplier #(.N(16), .M(16), .VARIANT(PPG_AREA))  u16a (.a(a16), .b(b16), .p(p16a));
  signed_booth_multiplier #(.N(16), .M(16), .VARIANT(PPG_DELAY)) u16d (.a(a16), .b(b16), .p(p16d));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string tag, input longint got_a, input longint got_d,
                       input longint exp);
    checks++;
    if (got_a != exp || got_d != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s area=%0d delay=%0d exp=%0d", tag, got_a, got_d, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        check("4x4", longint'($signed(p4a)), longint'($signed(p4d)),
              longint'($signed(a4)) * longint'($signed(b4)));
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); b6 = 6'(j);
        #1;
        check("8x8", longint'($signed(p8a)), longint'($signed(p8d)),
              longint'($signed(a8)) * longint'($signed(b8)));
        if (j < 64)
          check("8x6", longint'($signed(p86a)), longint'($signed(p86d)),
                longint'($signed(a8)) * longint'($signed(b6)));
      end
    for (int k = 0; k < 20000; k++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (k < 4) begin
        a16 = k[0] ? 16'h8000 : 16'h7fff;
        b16 = k[1] ? 16'h8000 : 16'h7fff;
      end
      #1;
      check("16x16", longint'($signed(p16a)), longint'($signed(p16d)),
            longint'($signed(a16)) * longint'($signed(b16)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
