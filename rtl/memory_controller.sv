`timescale 1ps/10fs
// memory_controller: sequences the PLL program between the memory, the error
// detector and the CPU.
//
// Flow (four states):
//   INIT  - after reset; the address counter is cleared. When `load` rises the
//           first word of `load_instruction` is written and LOAD is entered.
//   LOAD  - one word of `load_instruction` is written per clock at consecutive
//           addresses while `load` stays high; when it falls, go to TRANS.
//   TRANS - `error_set` is held high for SETTLE_CYCLES clocks to clear and rearm
//           the error detector, then released. When the (synchronised)
//           `error_valid` is seen, the error value and the Lead flag are
//           captured and ALGO is entered.
//   ALGO  - words are read from memory at the read address, one every two clocks
//           (address, then data):
//             * the input instruction l.movhi r12 (0x198004d2) is sent with its
//               immediate replaced by error[31:16], the input instruction
//               l.ori r12,r12 (0xa98c162f) with error[15:0];
//             * a block jump (opcode 0x1c) is executed here and not sent: the
//               read address moves to the start of block [3:0] if Ref_Clk led
//               Div_Clk, of block [7:4] otherwise, and reading continues;
//             * a zero word ends the pass: the read address steps past it and
//               the controller returns to TRANS;
//             * any other word is sent unchanged.
// CPU side: a Wishbone-style instruction port. A word is offered on
// `cpu_instruction` and acknowledged (`iwb_ack`, combinational) in the cycle the
// CPU holds `iwb_cyc` and `iwb_stb`; the CPU's fetch address is not used,
// because this controller, not the CPU's program counter, decides the order of
// instructions. A request while no word is ready gets `iwb_rty`, a request
// before a program was loaded gets `iwb_err`.
// Memory side: `mem_ce`, `mem_oe`, `mem_we` (active high), address and write
// data; read data arrives one clock after the address.
// All flops reset asynchronously on `rst_n` low; `error_valid` is synchronised
// with two flip-flops because the error detector runs asynchronously.
// The four states, the instruction patching and the block-jump encoding follow
// the document. The end-of-pass rule (zero word), the restart after the zero
// word, the settle time and the retry/error responses are this design's choices.
module memory_controller
  import sdpll_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // program loading
  input  logic        load,
  input  logic [31:0] load_instruction,
  // error detector
  output logic        error_set,
  input  logic        error_valid,
  input  logic        lead,
  input  logic        lag,
  input  logic [31:0] error_value,
  // memory
  output logic        mem_we,
  output logic        mem_oe,
  output logic        mem_ce,
  output logic [31:0] to_mem_instruction,
  output logic [7:0]  to_mem_address,
  input  logic [31:0] from_mem_instruction,
  // CPU instruction bus
  input  logic        iwb_cyc,
  input  logic        iwb_stb,
  output logic [31:0] cpu_instruction,
  output logic        iwb_ack,
  output logic        iwb_err,
  output logic        iwb_rty,
  // status
  output mc_state_t   state,
  output logic        pass_done
);

  localparam int unsigned SET_W = $clog2(SETTLE_CYCLES + 1);

  logic [7:0]       wr_addr;
  logic [7:0]       rd_addr;
  logic             rd_phase;      // 0: address issued, 1: word available
  logic [SET_W-1:0] settle;
  logic [1:0]       valid_sync;
  logic [31:0]      err_q;
  logic             lead_q;

  logic [31:0] word;
  logic        word_zero, word_jump, word_send, req;
  logic [3:0]  jump_block;

  assign word       = from_mem_instruction;
  assign word_zero  = (word == 32'h0);
  assign word_jump  = (word[31:26] == OPC_BLOCK_JUMP);
  assign word_send  = (state == MC_ALGO) && rd_phase && !word_zero && !word_jump;
  assign jump_block = lead_q ? word[3:0] : word[7:4];
  assign req        = iwb_cyc && iwb_stb;

  // Instruction patching (input instructions).
  always_comb begin
    if (word == INSTR_IN_HI)      cpu_instruction = {word[31:16], err_q[31:16]};
    else if (word == INSTR_IN_LO) cpu_instruction = {word[31:16], err_q[15:0]};
    else                          cpu_instruction = word;
  end

  assign iwb_ack = word_send && req;
  assign iwb_err = req && (state == MC_INIT || state == MC_LOAD);
  assign iwb_rty = req && !iwb_ack && (state == MC_TRANS || state == MC_ALGO);

  // Memory port.
  always_comb begin
    mem_we             = 1'b0;
    mem_oe             = 1'b0;
    mem_ce             = 1'b0;
    to_mem_address     = rd_addr;
    to_mem_instruction = load_instruction;
    if ((state == MC_INIT || state == MC_LOAD) && load) begin
      mem_ce         = 1'b1;
      mem_we         = 1'b1;
      to_mem_address = wr_addr;
    end else if (state == MC_ALGO && !rd_phase) begin
      mem_ce = 1'b1;
      mem_oe = 1'b1;
    end
  end

  // Held low during reset, so that its rise at reset release clears the
  // error detector's edge-cleared state (TDC counter, one-pulse lock).
  assign error_set = rst_n && ((state != MC_TRANS) || (settle != '0));
  assign pass_done = (state == MC_ALGO) && rd_phase && word_zero;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_sync <= '0;
    else        valid_sync <= {valid_sync[0], error_valid};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= MC_INIT;
      wr_addr  <= '0;
      rd_addr  <= '0;
      rd_phase <= 1'b0;
      settle   <= SET_W'(SETTLE_CYCLES);
      err_q    <= '0;
      lead_q   <= 1'b0;
    end else begin
      unique case (state)
        MC_INIT: begin
          wr_addr <= '0;
          rd_addr <= '0;
          if (load) begin
            wr_addr <= 8'd1;
            state   <= MC_LOAD;
          end
        end
        MC_LOAD: begin
          if (load) begin
            wr_addr <= wr_addr + 8'd1;
          end else begin
            state  <= MC_TRANS;
            settle <= SET_W'(SETTLE_CYCLES);
          end
        end
        MC_TRANS: begin
          if (settle != '0) begin
            settle <= settle - 1'b1;
          end else if (valid_sync[1]) begin
            err_q    <= error_value;
            lead_q   <= lead && !lag;
            rd_phase <= 1'b0;
            state    <= MC_ALGO;
          end
        end
        MC_ALGO: begin
          if (!rd_phase) begin
            rd_phase <= 1'b1;
          end else if (word_zero) begin
            rd_addr  <= rd_addr + 8'd1;
            rd_phase <= 1'b0;
            settle   <= SET_W'(SETTLE_CYCLES);
            state    <= MC_TRANS;
          end else if (word_jump) begin
            rd_addr  <= {jump_block, 4'h0};
            rd_phase <= 1'b0;
          end else if (req) begin
            rd_addr  <= rd_addr + 8'd1;
            rd_phase <= 1'b0;
          end
        end
        default: state <= MC_INIT;
      endcase
    end
  end

endmodule
