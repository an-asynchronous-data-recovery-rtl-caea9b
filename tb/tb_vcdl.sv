`timescale 1ps/1fs
// tb_vcdl: sends a random bit stream at the nominal bit period into the delay
// line with the code that makes a cell a quarter period long (to within the
// code resolution), and checks at random instants that every tap shows the
// input value from (k+1) quarter periods earlier, taken from a record of the
// input kept by the testbench. Instants within 20 ps of a predicted edge are
// skipped.
module tb_vcdl;
  import adr_pkg::*;
  localparam int NT = 40;
  localparam real TB = 941.0;
  logic din = 1'b0;
  logic [CODE_W-1:0] ctrl = 8'd197;
  logic [NT-1:0] tap;
  int checks = 0, failures = 0;
  logic bits [0:1999];
  realtime t0, d;

  vcdl #(.NTAPS(NT)) dut (.din(din), .ctrl(ctrl), .tap(tap));

  function automatic logic past_in(realtime t, output logic near);
    // value of din at time t, and whether t is within 20 ps of a bit boundary
    real pos = (t - t0) / TB;
    int  i   = int'($floor(pos));
    near = (pos - $floor(pos)) * TB < 20.0 || (1.0 - (pos - $floor(pos))) * TB < 20.0;
    return (i < 0) ? 1'b0 : bits[i];
  endfunction

  initial begin
    d = 390.0 - 200.0 * 197.0 / 255.0;
    foreach (bits[i]) bits[i] = 1'(($urandom_range(2) == 0) ? 1 : 0) ^ ((i > 0) ? bits[i-1] : 1'b0);
    #5000;
    t0 = $realtime;
    fork
      for (int i = 0; i < 2000; i++) begin din = bits[i]; #(TB * 1ps); end
      begin
        #(30 * TB * 1ps);
        for (int s = 0; s < 300; s++) begin
          #($urandom_range(5000, 100) * 1ps);
          for (int k = 0; k < NT; k++) begin
            logic near, e;
            e = past_in($realtime - real'(k + 1) * d, near);
            if (!near) begin
              checks++;
              if (tap[k] !== e) begin
                failures++;
                if (failures < 10) $display("FAIL t=%0t tap %0d = %b expected %b", $realtime, k, tap[k], e);
              end
            end
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
