`timescale 1ps/10fs
// or_cpu_model: behavioural stand-in for the OpenRISC CPU, for testbenches only.
//
// Executes the ORBIS32 subset a PLL program needs, one instruction at a time
// with no pipeline: l.movhi, l.ori, l.addi, l.slli, l.srli, l.add, l.sub, l.sw
// and l.nop. It keeps a Wishbone-style instruction request (iwb_cyc/iwb_stb)
// raised and executes the word presented with iwb_ack; the fetch address is not
// modelled because the memory controller decides the instruction order. A store
// raises dwb_cyc/dwb_stb/dwb_we with the effective address and data until
// dwb_ack, and no instruction is taken meanwhile. r0 reads as zero.
module or_cpu_model (
  input  logic        clk,
  input  logic        rst_n,
  output logic        iwb_cyc,
  output logic        iwb_stb,
  input  logic [31:0] iwb_dat,
  input  logic        iwb_ack,
  output logic        dwb_cyc,
  output logic        dwb_stb,
  output logic        dwb_we,
  output logic [31:0] dwb_adr,
  output logic [31:0] dwb_dat,
  input  logic        dwb_ack,
  output int          n_exec,
  output int          n_store,
  output logic [31:0] last_r12
);

  logic [31:0] r [32];
  logic        storing;

  assign iwb_cyc = rst_n && !storing;
  assign iwb_stb = rst_n && !storing;
  assign dwb_cyc = storing;
  assign dwb_stb = storing;
  assign dwb_we  = storing;
  assign last_r12 = r[12];

  function automatic logic [31:0] rd(input logic [4:0] a);
    return (a == 5'd0) ? 32'd0 : r[a];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      storing <= 1'b0;
      n_exec  <= 0;
      n_store <= 0;
      dwb_adr <= '0;
      dwb_dat <= '0;
      for (int i = 0; i < 32; i++) r[i] <= '0;
    end else if (storing) begin
      if (dwb_ack) begin
        storing <= 1'b0;
        n_store <= n_store + 1;
      end
    end else if (iwb_ack) begin
      logic [31:0] i;
      logic [4:0]  d, a, b;
      i = iwb_dat;
      d = i[25:21]; a = i[20:16]; b = i[15:11];
      n_exec <= n_exec + 1;
      unique case (i[31:26])
        6'h06: r[d] <= {i[15:0], 16'h0};                                  // l.movhi
        6'h2a: r[d] <= rd(a) | {16'h0, i[15:0]};                          // l.ori
        6'h27: r[d] <= rd(a) + {{16{i[15]}}, i[15:0]};                    // l.addi
        6'h2e: r[d] <= (i[7:6] == 2'b00) ? rd(a) << i[5:0] : rd(a) >> i[5:0]; // l.slli/srli
        6'h38: r[d] <= (i[3:0] == 4'h2) ? rd(a) - rd(b) : rd(a) + rd(b);  // l.sub/l.add
        6'h35: begin                                                      // l.sw
          dwb_adr <= rd(a) + {{16{i[25]}}, i[25:21], i[10:0]};
          dwb_dat <= rd(b);
          storing <= 1'b1;
        end
        default: ;                                                        // l.nop
      endcase
    end
  end

endmodule
