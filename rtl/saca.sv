`timescale 1ps/10fs
// saca: behavioural model of the Semi Asynchronous Clock Access, the clock
// source of the CPU side. This is a behavioural model, not synthesizable
// logic: the real part is a NAND-switched ring through a selectable delay
// matrix, whose period is set by cell delays.
//
// Every rising edge of `ref_clk` (passed through a two-flip-flop synchroniser
// in the real circuit) clears the cycle counter, and `embed_clk` then
// oscillates until the counter reaches `m_cycle`; the comparator then stops the
// ring and the clock idles high (the low-noise idle level). `n_mode` selects the
// delay-matrix tap and so the frequency: 0: 263 MHz, 1: 134 MHz, 2: 90 MHz,
// 3: 67 MHz. While `burst_mode` or `initial_signal` is high the clock runs
// without stopping (`initial_signal` is used while the program is loaded).
// A cycle is a low phase followed by a high phase; the counter counts the
// rising edges that end each cycle. The synchroniser's latency is not modelled.
// The frequencies, the 5-bit M_CYCLE and 2-bit N_MODE controls and the
// idle-high rule follow the document; the meaning given to `burst_mode` and
// `initial_signal` is this design's reading of the schematic.
module saca #(
  parameter real HALF_PS_MODE0 = 1901.0,  // 263 MHz
  parameter real HALF_PS_MODE1 = 3731.0,  // 134 MHz
  parameter real HALF_PS_MODE2 = 5556.0,  //  90 MHz
  parameter real HALF_PS_MODE3 = 7463.0   //  67 MHz
) (
  input  logic       ref_clk,
  input  logic       initial_signal,
  input  logic       burst_mode,
  input  logic [4:0] m_cycle,
  input  logic [1:0] n_mode,
  output logic       embed_clk
);

  logic       restart_tgl;
  logic       seen_tgl;
  logic [4:0] count;
  real        half_ps;

  initial begin
    embed_clk   = 1'b1;
    restart_tgl = 1'b0;
    seen_tgl    = 1'b0;
    count       = 5'd31;
  end

  always @(posedge ref_clk) restart_tgl <= !restart_tgl;

  always begin
    if (restart_tgl != seen_tgl) begin
      seen_tgl = restart_tgl;
      count    = 5'd0;
    end
    if (burst_mode || initial_signal || count < m_cycle) begin
      unique case (n_mode)
        2'd0:    half_ps = HALF_PS_MODE0;
        2'd1:    half_ps = HALF_PS_MODE1;
        2'd2:    half_ps = HALF_PS_MODE2;
        default: half_ps = HALF_PS_MODE3;
      endcase
      embed_clk = 1'b0;
      #(half_ps);
      embed_clk = 1'b1;
      #(half_ps);
      if (count != 5'd31) count = count + 5'd1;
    end else begin
      @(restart_tgl or burst_mode or initial_signal or m_cycle);
    end
  end

endmodule
