// Self-checking testbench for gt_comparator: exhaustive at 4 bits (the width
// of the original drawing), random at the 8-bit default and at 16 bits.
// Expected value: p_n = !(a > b), computed with the language's own compare.
module tb_gt_comparator;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4;   logic p4;
  logic [7:0]  a8, b8;   logic p8;
  logic [15:0] a16, b16; logic p16;

  gt_comparator #(.W(4))  u4  (.a(a4),  .b(b4),  .p_n(p4));
  gt_comparator           u8  (.a(a8),  .b(b8),  .p_n(p8));
  gt_comparator #(.W(16)) u16 (.a(a16), .b(b16), .p_n(p16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if (p4 !== !(i > j)) begin
          failures++;
          $display("W=4 a=%0d b=%0d p_n=%b", i, j, p4);
        end
      end
    for (int n = 0; n < 2000; n++) begin
      a8 = 8'($urandom); b8 = (n % 4 == 0) ? a8 : 8'($urandom);
      a16 = 16'($urandom); b16 = (n % 5 == 0) ? a16 ^ 16'(1 << (n % 16)) : 16'($urandom);
      #1;
      checks += 2;
      if (p8 !== !(a8 > b8)) begin
        failures++;
        $display("W=8 a=%0d b=%0d p_n=%b", a8, b8, p8);
      end
      if (p16 !== !(a16 > b16)) begin
        failures++;
        $display("W=16 a=%0d b=%0d p_n=%b", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
