// tmr_module_tb: self-checking test of one scan-chained replica.
//
// Checks, against a model kept in the testbench: reset value; counting down
// by one per enabled clock and holding when disabled; scan shifting (bits
// entering at sci appear at sco W clocks later, MSB first out); that a W-clock
// rotation (sco fed back to sci) leaves the state unchanged; that scan has
// priority over counting; and that the fault-injection mask flips bits.
module tmr_module_tb;
  localparam int unsigned W = 3;

  logic         clk = 1'b0;
  logic         rst_n, c_in, sce, sci;
  logic [W-1:0] fis, q;
  logic         sco;
  int           checks = 0, failures = 0;
  logic [W-1:0] model;

  tmr_module #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; c_in = 1'b0; sce = 1'b0; sci = 1'b0; fis = '0;
    #12 rst_n = 1'b1;
    model = '0;
    check(model, "reset");

    // Count down, with random enable.
    for (int n = 0; n < 40; n++) begin
      c_in = 1'($urandom);
      @(posedge clk); #1;
      if (c_in) model = model - 1'b1;
      check(model, "count");
    end
    c_in = 1'b0;

    // Rotation: sco back to sci for W clocks restores the state; also
    // check the bits coming out at sco, MSB first.
    for (int r = 0; r < 6; r++) begin
      logic [W-1:0] start;
      start = q;
      sce   = 1'b1;
      c_in  = 1'($urandom);             // scan has priority over counting
      for (int b = 0; b < W; b++) begin
        sci = sco;
        checks++;
        if (sco !== start[W-1-b]) begin
          failures++;
          $display("FAIL rotate bit %0d: sco=%b", b, sco);
        end
        @(posedge clk); #1;
      end
      sce = 1'b0;
      check(start, "rotate");
      c_in = 1'b1;
      @(posedge clk); #1;
      c_in = 1'b0;
    end

    // Shift in a new value, MSB first.
    for (int r = 0; r < 8; r++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      sce = 1'b1;
      for (int b = W - 1; b >= 0; b--) begin
        sci = v[b];
        @(posedge clk); #1;
      end
      sce = 1'b0;
      check(v, "shift-in");
    end

    // Fault injection flips the selected bits.
    model = q;
    for (int r = 0; r < 8; r++) begin
      fis = W'($urandom);
      @(posedge clk); #1;
      model = model ^ fis;
      fis = '0;
      check(model, "fault injection");
    end

    // Reset in mid-operation.
    rst_n = 1'b0; #1;
    check('0, "async reset");
    rst_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
