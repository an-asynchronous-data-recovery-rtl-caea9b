`timescale 1ps/1fs
// tb_purge_logic: generates a random bit stream with runs of at most five
// equal bits (the 8B/10B limit), starting with a long idle run of zeros. At
// every rising transition it forms the ten samples the delay line would hold
// and checks the purge logic's output against the bits that arrived since
// the previous rising transition, taken directly from the stream (all ten
// for the first transition). It also checks that unused outputs are zero.
module tb_purge_logic;
  localparam int NB = 10;
  localparam int LEN = 20000;
  logic [NB-1:0] smp, bits;
  logic [3:0]    count;
  int checks = 0, failures = 0;
  logic stream [0:LEN-1];
  int prev_edge, n_exp, reads, short_reads;

  purge_logic #(.NBITS(NB)) dut (.smp(smp), .bits(bits), .count(count));

  initial begin
    int run;
    // idle zeros, then random data with runs limited to 5
    for (int i = 0; i < 30; i++) stream[i] = 1'b0;
    stream[30] = 1'b1; run = 1;
    for (int i = 31; i < LEN; i++) begin
      if (run == 5 || $urandom_range(1) == 1) begin stream[i] = ~stream[i-1]; run = 1; end
      else begin stream[i] = stream[i-1]; run++; end
    end
    prev_edge = -1;
    reads = 0; short_reads = 0;
    for (int i = 1; i < LEN; i++) begin
      if (stream[i] && !stream[i-1]) begin
        for (int m = 0; m < NB; m++) smp[m] = stream[i-1-m];
        n_exp = (prev_edge < 0 || i - prev_edge > NB) ? NB : i - prev_edge;
        #1;
        checks++; reads++;
        if (n_exp < NB) short_reads++;
        if (int'(count) != n_exp) begin
          failures++;
          if (failures < 10) $display("FAIL at bit %0d count=%0d expected %0d", i, count, n_exp);
        end
        for (int j = 0; j < NB; j++) begin
          logic e;
          e = (j < n_exp) ? stream[i - n_exp + j] : 1'b0;
          checks++;
          if (bits[j] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL at bit %0d: bits[%0d]=%b expected %b", i, j, bits[j], e);
          end
        end
        prev_edge = i;
      end
    end
    checks++;
    if (short_reads == 0) begin failures++; $display("FAIL no overlapping reads exercised"); end
    $display("INFO %0d reads, %0d with redundant samples purged", reads, short_reads);
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
