// tb_trigger_unit: self-checking test of the trigger logic.
// Random channel samples, masks and values are applied; the expected group
// matches are computed bit by bit in the testbench and compared with the
// module.  Directed cases: an all-zero enable mask never matches, the
// manual trigger fires alone, nothing fires while disarmed, and a rising
// edge pattern on one channel.
module tb_trigger_unit;
  import dla_pkg::*;
  logic [31:0] d_cur, d_prev;
  logic [31:0] val_hi [8], val_lo [8], en [8];
  logic armed, man_trig, trigger;
  logic [7:0] group_match;
  int checks = 0, failures = 0;

  trigger_unit dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic logic [7:0] ref_match();
    logic [7:0] r;
    for (int g = 0; g < 8; g++) begin
      logic ok = 1'b1;
      logic any = 1'b0;
      for (int i = 0; i < 32; i++) if (en[g][i]) begin
        any = 1'b1;
        if (val_hi[g][i] != d_prev[i] || val_lo[g][i] != d_cur[i]) ok = 1'b0;
      end
      r[g] = ok && any;
    end
    return r;
  endfunction

  initial begin
    for (int g = 0; g < 8; g++) begin val_hi[g] = 0; val_lo[g] = 0; en[g] = 0; end
    d_cur = 0; d_prev = 0; armed = 1; man_trig = 0;
    #1 chk(!trigger && group_match == 0, "no enable, no trigger");
    man_trig = 1;
    #1 chk(trigger, "manual trigger");
    armed = 0;
    #1 chk(!trigger, "disarmed manual trigger");
    armed = 1; man_trig = 0;
    // rising edge on channel 5 in group 3
    en[3] = 32'h20; val_hi[3] = 0; val_lo[3] = 32'h20;
    d_prev = 0; d_cur = 32'h20;
    #1 chk(trigger && group_match == 8'h08, "rising edge match");
    d_prev = 32'h20;
    #1 chk(!trigger, "steady high is not a rising edge");
    // random
    for (int n = 0; n < 3000; n++) begin
      for (int g = 0; g < 8; g++) begin
        en[g] = $urandom() & $urandom() & $urandom();   // sparse masks
        if ($urandom_range(0, 3) == 0) en[g] = 0;
        val_hi[g] = $urandom(); val_lo[g] = $urandom();
      end
      d_cur = $urandom(); d_prev = $urandom();
      // make some groups match on purpose
      if (n % 3 == 0) begin
        int g = $urandom_range(0, 7);
        val_hi[g] = (val_hi[g] & ~en[g]) | (d_prev & en[g]);
        val_lo[g] = (val_lo[g] & ~en[g]) | (d_cur & en[g]);
      end
      armed = $urandom_range(0, 7) != 0;
      man_trig = $urandom_range(0, 15) == 0;
      #1;
      chk(group_match == ref_match(), "group match");
      chk(trigger == (armed && (man_trig || ref_match() != 0)), "trigger");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
