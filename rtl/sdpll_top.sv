`timescale 1ps/10fs
// sdpll_top: software-defined phase-locked loop around an external CPU.
//
// An all-digital PLL whose loop arithmetic runs as a program on a 32-bit
// OpenRISC (ORBIS32) CPU. The hardware here measures, sequences and actuates;
// the CPU, outside this module, computes:
//   * saca               - the CPU-side clock `embed_clk`: a burst of m_cycle
//                          cycles at a frequency chosen by n_mode after every
//                          Ref_Clk rising edge, idle high otherwise;
//   * memory_controller  - loads the program into the 256 x 32 memory, then
//                          per measurement streams one pass of it to the CPU,
//                          inserting the measured error into the two input
//                          instructions and resolving block jumps on Lead/Lag;
//   * sdpll_memory       - the program memory;
//   * error_detector     - frequency divider, phase detector, one-pulse lock /
//                          pulse amplifier and the 1 ps TDC;
//   * state_controller   - decodes the Infor bits of the CPU's store address
//                          (DCO mode, detect mode, tracking mode);
//   * dco_interface      - takes the stored control word and drives the DCO
//                          word in the DCO clock domain;
//   * dco                - behavioural oscillator, period = word x 10 fs.
// The CPU's Wishbone instruction bus (fetch request in, instruction/ack out)
// and data bus (store address/data in, ack out) are ports of this module; the
// CPU must be clocked by `embed_clk`. The CPU bus of the document is only these
// wires.
// Reset `rst_n` is asynchronous, active low. While `load` is high one program
// word per `embed_clk` cycle is taken from `load_instruction`; `embed_clk` runs
// continuously during loading.
module sdpll_top
  import sdpll_pkg::*;
#(
  parameter int unsigned DIV_W = 16
) (
  input  logic             ref_clk,
  input  logic             rst_n,
  // program loading and clock access control
  input  logic             load,
  input  logic [31:0]      load_instruction,
  input  logic [4:0]       m_cycle,
  input  logic [1:0]       n_mode,
  input  logic             burst_mode,
  input  logic [DIV_W-1:0] div_value,
  // CPU clock
  output logic             embed_clk,
  // CPU instruction bus
  input  logic             iwb_cyc,
  input  logic             iwb_stb,
  output logic [31:0]      cpu_instruction,
  output logic             iwb_ack,
  output logic             iwb_err,
  output logic             iwb_rty,
  // CPU data bus
  input  logic             dwb_cyc,
  input  logic             dwb_stb,
  input  logic             dwb_we,
  input  logic [31:0]      cpu_address,
  input  logic [31:0]      cpu_data,
  output logic             dwb_ack,
  output logic             dwb_err,
  output logic             dwb_rty,
  // PLL outputs and status
  output logic             dco_clk,
  output logic             div_clk,
  output logic [31:0]      ctw,
  output logic             dco_mode,
  output logic             detect_mode,
  output logic             tracking_mode,
  output logic             error_valid,
  output logic [31:0]      error_value,
  output logic             lead,
  output mc_state_t        mc_state,
  output dco_state_t       dco_state,
  output logic             pass_done
);

  logic        error_set;
  logic        lag;
  logic        mem_we, mem_oe, mem_ce;
  logic [7:0]  mem_addr;
  logic [31:0] mem_wdata, mem_rdata;

  saca u_saca (
    .ref_clk        (ref_clk),
    .initial_signal (load),
    .burst_mode     (burst_mode),
    .m_cycle        (m_cycle),
    .n_mode         (n_mode),
    .embed_clk      (embed_clk)
  );

  memory_controller u_mc (
    .clk                  (embed_clk),
    .rst_n                (rst_n),
    .load                 (load),
    .load_instruction     (load_instruction),
    .error_set            (error_set),
    .error_valid          (error_valid),
    .lead                 (lead),
    .lag                  (lag),
    .error_value          (error_value),
    .mem_we               (mem_we),
    .mem_oe               (mem_oe),
    .mem_ce               (mem_ce),
    .to_mem_instruction   (mem_wdata),
    .to_mem_address       (mem_addr),
    .from_mem_instruction (mem_rdata),
    .iwb_cyc              (iwb_cyc),
    .iwb_stb              (iwb_stb),
    .cpu_instruction      (cpu_instruction),
    .iwb_ack              (iwb_ack),
    .iwb_err              (iwb_err),
    .iwb_rty              (iwb_rty),
    .state                (mc_state),
    .pass_done            (pass_done)
  );

  sdpll_memory #(.DEPTH(MEM_WORDS), .WIDTH(32)) u_mem (
    .clk   (embed_clk),
    .ce    (mem_ce),
    .oe    (mem_oe),
    .we    (mem_we),
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );

  error_detector #(.DIV_W(DIV_W)) u_ed (
    .ref_clk     (ref_clk),
    .dco_clk     (dco_clk),
    .rst_n       (rst_n),
    .div_value   (div_value),
    .detect_mode (detect_mode),
    .error_set   (error_set),
    .div_clk     (div_clk),
    .error_valid (error_valid),
    .error_value (error_value),
    .lead        (lead),
    .lag         (lag)
  );

  state_controller u_sc (
    .clk           (embed_clk),
    .rst_n         (rst_n),
    .dwb_cyc       (dwb_cyc),
    .dwb_stb       (dwb_stb),
    .dwb_we        (dwb_we),
    .dwb_ack       (dwb_ack),
    .cpu_address   (cpu_address),
    .dco_mode      (dco_mode),
    .detect_mode   (detect_mode),
    .tracking_mode (tracking_mode)
  );

  dco_interface u_dcoif (
    .clk       (embed_clk),
    .rst_n     (rst_n),
    .dwb_cyc   (dwb_cyc),
    .dwb_stb   (dwb_stb),
    .dwb_we    (dwb_we),
    .cpu_data  (cpu_data),
    .dwb_ack   (dwb_ack),
    .dwb_err   (dwb_err),
    .dwb_rty   (dwb_rty),
    .dco_mode  (dco_mode),
    .dco_clk   (dco_clk),
    .ctw       (ctw),
    .dco_state (dco_state)
  );

  dco u_dco (
    .ctw     (ctw),
    .dco_clk (dco_clk)
  );

endmodule
