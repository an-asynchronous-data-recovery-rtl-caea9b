`timescale 1ps/1fs
// tb_read_pulse_gen: checks that no pulse comes while disabled; then drives
// data edges and checks that each rising edge gives
// exactly one read pulse, starting with the edge and one cell delay wide,
// that falling edges give none, and that rd_done is the complement.
module tb_read_pulse_gen;
  import adr_pkg::*;
  logic din = 1'b0;
  logic [CODE_W-1:0] ctrl = 8'd197;
  logic read_pulse, rd_done;
  logic en = 1'b0;
  int checks = 0, failures = 0;
  int pulses = 0;
  realtime t_rise, w, d;

  read_pulse_gen dut (.din(din), .ctrl(ctrl), .en(en), .read_pulse(read_pulse), .rd_done(rd_done));

  always @(posedge read_pulse) begin pulses++; t_rise = $realtime; end
  always @(negedge read_pulse) begin
    w = $realtime - t_rise;
    checks++;
    if (w < d - 0.01 || w > d + 0.01) begin
      failures++; $display("FAIL pulse width %0.3f expected %0.3f", w, d);
    end
  end
  always @(read_pulse or rd_done) begin
    #1;
    checks++;
    if (rd_done !== ~read_pulse) begin failures++; $display("FAIL rd_done"); end
  end

  initial begin
    automatic int expected = 0;
    // disabled: no pulses at all
    #2000;
    repeat (10) begin
      din = 1'b1; #1;
      checks++;
      if (read_pulse !== 1'b0) begin failures++; $display("FAIL pulse while disabled"); end
      #2000 din = 1'b0; #2000;
    end
    en = 1'b1;
    #2000;
    for (int c = 0; c < 3; c++) begin
      ctrl = (c == 0) ? 8'd197 : (c == 1) ? 8'd60 : 8'd240;
      d = 390.0 - 200.0 * real'(ctrl) / 255.0;
      #2000;
      for (int i = 0; i < 30; i++) begin
        din = 1'b1; expected++;
        #1;
        checks++;
        if (read_pulse !== 1'b1) begin failures++; $display("FAIL no pulse at rising edge"); end
        #($urandom_range(4, 1) * 941 * 1ps);
        din = 1'b0;
        #1;
        checks++;
        if (read_pulse !== 1'b0) begin failures++; $display("FAIL pulse at falling edge"); end
        #($urandom_range(4, 1) * 941 * 1ps);
      end
    end
    checks++;
    if (pulses != expected) begin failures++; $display("FAIL %0d pulses, expected %0d", pulses, expected); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
