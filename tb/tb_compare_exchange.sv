// Self-checking testbench for compare_exchange: exhaustive at 4 bits and
// random at the 8-bit default. y1 must be the smaller and y2 the larger of
// the two inputs.
module tb_compare_exchange;

  int checks = 0, failures = 0;

  logic [3:0] x1a, x2a, y1a, y2a;
  logic [7:0] x1b, x2b, y1b, y2b;

  compare_exchange #(.W(4)) u4 (.x1(x1a), .x2(x2a), .y1(y1a), .y2(y2a));
  compare_exchange          u8 (.x1(x1b), .x2(x2b), .y1(y1b), .y2(y2b));

  task automatic check(int x1, int x2, int y1, int y2, string tag);
    int lo = (x1 < x2) ? x1 : x2;
    int hi = (x1 < x2) ? x2 : x1;
    checks++;
    if (y1 != lo || y2 != hi) begin
      failures++;
      $display("%s x1=%0d x2=%0d -> y1=%0d y2=%0d", tag, x1, x2, y1, y2);
    end
  endtask

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
        x1a = 4'(i); x2a = 4'(j); #1;
        check(i, j, int'(y1a), int'(y2a), "W=4");
      end
    for (int n = 0; n < 2000; n++) begin
      x1b = 8'($urandom); x2b = (n % 4 == 0) ? x1b : 8'($urandom); #1;
      check(int'(x1b), int'(x2b), int'(y1b), int'(y2b), "W=8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
