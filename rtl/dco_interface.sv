`timescale 1ps/10fs
// dco_interface: takes DCO control words from the CPU and hands them to the DCO
// in the DCO's own clock domain.
//
// CPU side (clock `clk`): a Wishbone-style write-only slave. A write
// (`dwb_cyc`, `dwb_stb`, `dwb_we`) is acknowledged one clock later with a
// single-cycle `dwb_ack`; the data word is registered and a toggle flag flips.
// A read is answered with `dwb_err`; `dwb_rty` is never raised.
// DCO side (clock `dco_clk`): the toggle is synchronised with two flip-flops.
// When its change arrives, the registered word is taken as a frequency word or
// a phase word according to `dco_mode` (from the state controller, updated by
// the same store and stable by then). A finite state machine then drives `ctw`:
//   COARSE_FREQ   - the frequency word (lock the frequency);
//   COARSE_PHASE  - entered when a phase word arrives (DCO_OP_SIGNAL); the
//                   phase word for exactly one DCO cycle (lock the phase);
//   COARSE_TRANS  - one DCO cycle with the frequency word again, then back to
//                   COARSE_FREQ.
// `ctw` is registered on the DCO clock. Both domains reset asynchronously on
// `rst_n` low; the frequency word then is 0, which the DCO model treats as its
// base frequency. The three states and their words follow the document; the
// one-cycle phase step, the toggle handshake and the bus responses are this
// design's choices.
module dco_interface
  import sdpll_pkg::*;
(
  // CPU clock domain
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dwb_cyc,
  input  logic        dwb_stb,
  input  logic        dwb_we,
  input  logic [31:0] cpu_data,
  output logic        dwb_ack,
  output logic        dwb_err,
  output logic        dwb_rty,
  input  logic        dco_mode,
  // DCO clock domain
  input  logic        dco_clk,
  output logic [31:0] ctw,
  output dco_state_t  dco_state
);

  logic [31:0] data_q;
  logic        wr_tgl;
  logic [2:0]  tgl_sync;
  logic        new_word;
  logic [31:0] freq_ctw;

  // ---------------- CPU clock domain ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dwb_ack <= 1'b0;
      dwb_err <= 1'b0;
      data_q  <= '0;
      wr_tgl  <= 1'b0;
    end else begin
      dwb_ack <= dwb_cyc && dwb_stb && dwb_we && !dwb_ack;
      dwb_err <= dwb_cyc && dwb_stb && !dwb_we && !dwb_err;
      if (dwb_cyc && dwb_stb && dwb_we && !dwb_ack) begin
        data_q <= cpu_data;
        wr_tgl <= !wr_tgl;
      end
    end
  end

  assign dwb_rty = 1'b0;

  // ---------------- DCO clock domain ----------------
  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) tgl_sync <= '0;
    else        tgl_sync <= {tgl_sync[1:0], wr_tgl};
  end

  assign new_word = tgl_sync[2] ^ tgl_sync[1];

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) begin
      freq_ctw  <= '0;
      ctw       <= '0;
      dco_state <= DCO_COARSE_FREQ;
    end else begin
      if (new_word && !dco_mode) freq_ctw <= data_q;
      unique case (dco_state)
        DCO_COARSE_FREQ: begin
          if (new_word && dco_mode) begin
            dco_state <= DCO_COARSE_PHASE;
            ctw       <= data_q;
          end else begin
            ctw <= (new_word && !dco_mode) ? data_q : freq_ctw;
          end
        end
        DCO_COARSE_PHASE: begin
          dco_state <= DCO_COARSE_TRANS;
          ctw       <= freq_ctw;
        end
        DCO_COARSE_TRANS: begin
          dco_state <= DCO_COARSE_FREQ;
          ctw       <= freq_ctw;
        end
        default: dco_state <= DCO_COARSE_FREQ;
      endcase
    end
  end

endmodule
