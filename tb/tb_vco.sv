`timescale 1ps/1fs
// tb_vco: measures the oscillator period averaged over 1000 cycles for
// several trim codes and compares it with T / (1 + code * step), worked out
// here; checks that en low stops the clock.
module tb_vco;
  import adr_pkg::*;
  logic en = 1'b1;
  logic signed [VCO_CODE_W-1:0] code = '0;
  logic clk;
  int checks = 0, failures = 0;
  realtime t0, t1, p, pe;

  vco dut (.en(en), .code(code), .clk(clk));

  initial begin
    automatic int codes[5] = '{0, 1, -1, 15, -16};
    foreach (codes[i]) begin
      code = VCO_CODE_W'(codes[i]);
      repeat (3) @(posedge clk);
      t0 = $realtime;
      repeat (1000) @(posedge clk);
      t1 = $realtime;
      p  = (t1 - t0) / 1000.0;
      pe = 941.0 / (1.0 + real'(codes[i]) * 25.0e-6);
      checks++;
      if (p < pe - 0.002 || p > pe + 0.002) begin
        failures++;
        $display("FAIL code %0d period %0.4f expected %0.4f", codes[i], p, pe);
      end
    end
    en = 1'b0;
    #2000;
    t0 = $realtime;
    fork
      begin @(posedge clk); t1 = $realtime; end
      #10000;
    join_any
    disable fork;
    checks++;
    if (clk !== 1'b0 || t1 > t0) begin failures++; $display("FAIL clock runs with en low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
