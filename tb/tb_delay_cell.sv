`timescale 1ps/1fs
// tb_delay_cell: measures the delay of the behavioural delay cell for several
// control codes, on rising and on falling edges, and compares it with the
// linear code-to-delay law worked out here from the two end points.
module tb_delay_cell;
  import adr_pkg::*;
  logic in = 1'b0, out;
  logic [CODE_W-1:0] ctrl = '0;
  int checks = 0, failures = 0;
  realtime t_in, t_out, expd;

  delay_cell dut (.in(in), .ctrl(ctrl), .out(out));

  task automatic measure(input logic [CODE_W-1:0] c, input logic v);
    ctrl = c;
    #1000;
    expd = 390.0 - 200.0 * real'(c) / 255.0;
    in = v; t_in = $realtime;
    @(out); t_out = $realtime;
    checks++;
    if ((t_out - t_in) < expd - 0.01 || (t_out - t_in) > expd + 0.01 || out !== v) begin
      failures++;
      $display("FAIL code=%0d edge=%b delay=%0.3f expected=%0.3f", c, v, t_out - t_in, expd);
    end
  endtask

  initial begin
    #200;
    measure(8'd0, 1'b1);   measure(8'd0, 1'b0);
    measure(8'd255, 1'b1); measure(8'd255, 1'b0);
    measure(8'd197, 1'b1); measure(8'd197, 1'b0);
    for (int k = 0; k < 20; k++) measure(CODE_W'($urandom_range(255)), ~in);
    // A pulse twice the delay passes with its width kept.
    ctrl = 8'd128; #1000;
    fork
      begin
        @(posedge out) t_in = $realtime;
        @(negedge out) t_out = $realtime;
      end
    join_none
    in = 1'b1; #600 in = 1'b0;
    #1000;
    checks++;
    if (t_out - t_in < 599.99 || t_out - t_in > 600.01) begin
      failures++; $display("FAIL pulse width %0.3f", t_out - t_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
