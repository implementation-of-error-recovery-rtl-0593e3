// master_checker_tb: self-checking test of the master/checker selector.
// For each disregarded replica, random replica outputs are applied; the
// expected master is the lowest-numbered remaining replica and the checker
// the other one.
module master_checker_tb;
  import smertmr_pkg::*;
  localparam int unsigned W = 3;

  logic [2:0][W-1:0] q;
  mod_id_t           disregard, master_id, checker_id;
  logic [W-1:0]      out;
  logic              mc_error;
  int                checks = 0, failures = 0;

  master_checker #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 1; d <= 3; d++) begin
      for (int n = 0; n < 200; n++) begin
        int m, c;
        disregard = mod_id_t'(d);
        q = 9'($urandom);
        if (n % 3 == 0) q[(d == 1) ? 2 : 1] = q[(d == 1) ? 1 : 0];  // force agreement
        #1;
        m = (d == 1) ? 1 : 0;
        c = (d == 3) ? 1 : 2;
        checks++;
        if (out !== q[m] || mc_error !== (q[m] != q[c]) ||
            master_id !== mod_id_t'(m + 1) || checker_id !== mod_id_t'(c + 1)) begin
          failures++;
          $display("FAIL d=%0d q=%h out=%b err=%b", d, q, out, mc_error);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
