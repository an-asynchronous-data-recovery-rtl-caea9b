`timescale 1ps/1fs
// adr_top: asynchronous data recovery and retransmission.
//
// The incoming serial data runs through a delay line ten bit periods long,
// tapped every quarter bit. No clock is recovered: each rising transition of
// the data itself produces a read pulse (read_pulse_gen) that latches the
// centre of every bit still in the line (sample_latch). The purge logic
// drops the bits already stored by the previous read, the load pointer
// advances by the number of new bits and the FIFO stores them. A local
// oscillator (vco) clocks the bits out through the retransmit pointer and the
// retimer; the timing control compares the two pointers and trims the
// oscillator so that the buffer neither drains nor fills.
//
// All delay cells (the data line, the T/4 read-pulse cell and the DLL's
// replica) share the control code of the DLL, which locks four cells to one
// period of the reference clock before data is accepted, then sleeps.
//
// Clock domains: ref_clk (DLL), the read pulses (sample latch on their rising
// edge; load pointer and FIFO write on their falling edge) and the oscillator
// clock `retx_clk` (retransmit side). Read pulses are suppressed until the
// DLL has calibrated once, so nothing is written before then. rst_n
// is an asynchronous active-low reset for every domain.
//
// Outputs: `retimed_data` is valid on rising edges of `retx_clk` while
// `retimed_valid` is high. The status outputs expose the DLL code and state,
// the oscillator trim code, the retransmit state and buffer fill, and
// one-clock underflow/overflow pulses.
//
// The delay line, delay cells and oscillator are behavioural models of analog
// parts; everything else is synthesizable.
module adr_top
  import adr_pkg::*;
#(
  parameter int unsigned DEPTH      = FIFO_DEPTH,
  parameter int unsigned NBITS      = N_BITS,
  parameter int unsigned ADJ_PERIOD = 64,
  parameter real         VCO_T_PS   = T_BIT_PS,
  parameter real         VCO_STEP   = VCO_STEP_PPM,
  localparam int unsigned PW        = $clog2(DEPTH) + 1,
  localparam int unsigned CW        = $clog2(NBITS + 1)
) (
  input  logic                        rst_n,
  input  logic                        ref_clk,
  input  logic                        recal,
  input  logic                        data_in,
  output logic                        retx_clk,
  output logic                        retimed_data,
  output logic                        retimed_valid,
  output logic [CODE_W-1:0]           dll_code,
  output logic                        dll_locked,
  output logic                        dll_calibrated,
  output logic signed [VCO_CODE_W-1:0] vco_code,
  output tx_state_e                   tx_state,
  output logic signed [PW-1:0]        fifo_fill,
  output logic                        underflow,
  output logic                        overflow,
  output logic                        read_pulse,
  output logic [CW-1:0]               read_count
);
  localparam int unsigned GRAN_SH = $clog2(NBITS);

  logic [NBITS*TAPS_PER_BIT-1:0] tap;
  logic                          rd_done;
  logic [NBITS-1:0]              smp, new_bits;
  logic [PW-1:0]                 load_ptr, retx_ptr, retx_load_val;
  logic [PW-GRAN_SH-1:0]         load_coarse_gray;
  logic                          run, retx_load, fifo_bit;

  dll u_dll (
    .ref_clk(ref_clk), .rst_n(rst_n), .recal(recal),
    .ctrl(dll_code), .locked(dll_locked), .calibrated(dll_calibrated)
  );

  vcdl #(.NTAPS(NBITS * TAPS_PER_BIT)) u_vcdl (.din(data_in), .ctrl(dll_code), .tap(tap));

  read_pulse_gen u_rpg (.din(data_in), .ctrl(dll_code),
                     .en(dll_calibrated),
                     .read_pulse(read_pulse), .rd_done(rd_done));

  sample_latch #(.NBITS(NBITS)) u_latch (
    .read_pulse(read_pulse), .rst_n(rst_n), .tap(tap), .smp(smp)
  );

  purge_logic #(.NBITS(NBITS)) u_purge (.smp(smp), .bits(new_bits), .count(read_count));

  load_pointer #(.DEPTH(DEPTH), .NBITS(NBITS), .GRAN_SH(GRAN_SH)) u_lptr (
    .wr_clk(rd_done), .rst_n(rst_n), .count(read_count),
    .ptr(load_ptr), .coarse_gray(load_coarse_gray)
  );

  fifo_ram #(.DEPTH(DEPTH), .NBITS(NBITS)) u_fifo (
    .wr_clk(rd_done), .waddr(load_ptr[PW-2:0]), .wbits(new_bits), .wcount(read_count),
    .raddr(retx_ptr[PW-2:0]), .rbit(fifo_bit)
  );

  vco #(.T_PS(VCO_T_PS), .STEP_PPM(VCO_STEP)) u_vco (.en(rst_n), .code(vco_code), .clk(retx_clk));

  timing_sync #(.DEPTH(DEPTH), .NBITS(NBITS), .GRAN_SH(GRAN_SH), .ADJ_PERIOD(ADJ_PERIOD)) u_tsync (
    .clk(retx_clk), .rst_n(rst_n), .calibrated(dll_calibrated),
    .load_coarse_gray(load_coarse_gray), .retx_ptr(retx_ptr),
    .run(run), .retx_load(retx_load), .retx_load_val(retx_load_val),
    .vco_code(vco_code), .state(tx_state), .fill(fifo_fill),
    .underflow(underflow), .overflow(overflow)
  );

  retransmit_pointer #(.DEPTH(DEPTH)) u_rptr (
    .clk(retx_clk), .rst_n(rst_n), .en(run), .load(retx_load),
    .load_val(retx_load_val), .ptr(retx_ptr)
  );

  retimer u_retimer (
    .clk(retx_clk), .rst_n(rst_n), .en(run), .din(fifo_bit),
    .dout(retimed_data), .valid(retimed_valid)
  );
endmodule
