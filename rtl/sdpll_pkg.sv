`timescale 1ps/10fs
// sdpll_pkg: constants and types shared by the software-defined PLL blocks.
//
// The instruction words below are the interface between the PLL program and the
// hardware. Two "input instructions" (an l.movhi and an l.ori, both writing r12)
// are recognised by the memory controller and have their 16-bit immediates
// replaced by the halves of the measured error value. A word with major opcode
// 0x1c is a block jump, executed by the memory controller rather than the CPU.
// The CPU reports results with l.sw (opcode 0x35); address bits [10:8] of the
// store carry the "Infor" field decoded by the state controller.
// All of these encodings follow the document. The enum encodings are this
// design's own choice.
package sdpll_pkg;

  // Input instructions (l.movhi r12,0x04d2 and l.ori r12,r12,0x162f as stored).
  localparam logic [31:0] INSTR_IN_HI = 32'h1980_04d2;
  localparam logic [31:0] INSTR_IN_LO = 32'ha98c_162f;

  localparam logic [5:0]  OPC_BLOCK_JUMP = 6'h1c;
  localparam logic [5:0]  OPC_SW         = 6'h35;

  // Memory size: 256 words, organised as 16 blocks of 16 words.
  localparam int unsigned MEM_WORDS   = 256;

  // Infor field of the store address (Table "pin assignment of the state controller").
  typedef struct packed {
    logic tracking_mode; // [2] 0 coarse tracking, 1 fine tracking
    logic detect_mode;   // [1] 0 frequency detection, 1 phase error detection
    logic dco_mode;      // [0] 0 frequency lock operation, 1 phase lock operation
  } infor_t;

  typedef enum logic [1:0] {
    MC_INIT  = 2'd0,
    MC_LOAD  = 2'd1,
    MC_TRANS = 2'd2,
    MC_ALGO  = 2'd3
  } mc_state_t;

  typedef enum logic [1:0] {
    DCO_COARSE_FREQ  = 2'd0,
    DCO_COARSE_PHASE = 2'd1,
    DCO_COARSE_TRANS = 2'd2
  } dco_state_t;

  // Rest pattern of a gated inverter ring: stage 0 is the AND switch output (0 at
  // rest), stage i>0 is the i-th inverter, so odd stages rest high.
  function automatic logic [255:0] ring_rest(input int unsigned stages);
    logic [255:0] r;
    r = '0;
    for (int unsigned i = 1; i < 256; i++)
      if (i < stages) r[i] = i[0];
    return r;
  endfunction

endpackage
