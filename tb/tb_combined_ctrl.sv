// Self-checking testbench for combined_ctrl at N = 6 and N = 16. After a
// start pulse it checks, cycle by cycle, the sequence the controller must
// produce: load_in only in the start cycle; step_en and busy for exactly
// N/2 cycles; sel_mux all 0 in the first iteration and all 1 afterwards;
// sel_demux all 1 in the last iteration only; done for one cycle right
// after it. A start while busy must not restart the sequence.
module tb_combined_ctrl;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst, start;

  logic        la6, se6, b6, d6;
  logic [5:0]  sm6, sd6;
  logic        la16, se16, b16, d16;
  logic [15:0] sm16, sd16;

  combined_ctrl #(.N(6)) u6 (
    .clk, .rst, .start, .load_in(la6), .step_en(se6),
    .sel_mux(sm6), .sel_demux(sd6), .busy(b6), .done(d6)
  );
  combined_ctrl u16 (
    .clk, .rst, .start, .load_in(la16), .step_en(se16),
    .sel_mux(sm16), .sel_demux(sd16), .busy(b16), .done(d16)
  );

  task automatic expect_true(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("%0t: %s", $time, msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; start = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    expect_true(!b6 && !b16 && !d6 && !d16 && !se6 && !se16, "not idle after reset");
    for (int run = 0; run < 20; run++) begin
      start = 1'b1;
      #1;
      expect_true(la6 && la16, "load_in not given with start");
      @(posedge clk);
      #1 start = (run % 2 == 1);   // odd runs: hold start high while busy
      // cycles after the start edge: iteration i of 16-lane controller
      for (int i = 0; i < 8; i++) begin
        expect_true(se16 && b16 && !la16, $sformatf("N=16 iteration %0d: step/busy", i));
        expect_true(sm16 == ((i == 0) ? 16'h0000 : 16'hffff), $sformatf("N=16 iteration %0d: sel_mux %h", i, sm16));
        expect_true(sd16 == ((i == 7) ? 16'hffff : 16'h0000), $sformatf("N=16 iteration %0d: sel_demux %h", i, sd16));
        expect_true(!d16, "N=16 done early");
        if (i < 3) begin
          expect_true(se6 && b6 && !la6, $sformatf("N=6 iteration %0d: step/busy", i));
          expect_true(sm6 == ((i == 0) ? 6'h00 : 6'h3f), $sformatf("N=6 iteration %0d: sel_mux %h", i, sm6));
          expect_true(sd6 == ((i == 2) ? 6'h3f : 6'h00), $sformatf("N=6 iteration %0d: sel_demux %h", i, sd6));
        end else if (i == 3) begin
          expect_true(d6 && !b6 && !se6, "N=6 done after 3 iterations");
        end
        if (i == 3) start = 1'b0;
        @(posedge clk);
        #1;
        if (i == 3) expect_true(!d6, "N=6 done longer than one cycle");
      end
      start = 1'b0;
      expect_true(d16 && !b16 && !se16, "N=16 done after 8 iterations");
      @(posedge clk);
      #1;
      expect_true(!d16 && !b16, "N=16 done longer than one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
