// risc8_top: 8-bit accumulator processor.
//
// One accumulator, a 32 x 8 memory holding program and data, and eight
// one-word instructions (3-bit opcode, 5-bit address). Every instruction takes
// eight cycles of clk: four to fetch it (the program counter addresses
// memory, the word is loaded into the instruction register) and four to
// execute it (the instruction's address field addresses memory, the ALU
// combines the accumulator with the operand, the result goes to the
// accumulator or, for STORE, back to memory through the IO buffer). The
// clock generator sequences the phases, the decoder turns phase and opcode
// into control signals. The block structure and the control table follow the
// processor's description; single-clock operation is this design's choice.
//
// Use: hold rstreq high, write the program with ewr/ead/edat (one word per
// clk), release rstreq. Execution starts at address 0 one cycle later and
// runs until a HALT instruction, after which halt stays high until the next
// rstreq.
module risc8_top (
  input  logic             clk,
  input  logic             rstreq,
  input  risc8_pkg::addr_t ead,
  input  risc8_pkg::word_t edat,
  input  logic             ewr,
  output logic             halt
);
  import risc8_pkg::*;

  logic     clk1, clk2, fetch, rst, halt_req;
  logic     aclk, ldac, ldir, ldpc, mrd, mwr, pclk;
  logic     zr, mem_oe;
  opcode_e  opcod;
  addr_t    adir, adpc, admen;
  word_t    acout, alout, mdat, mem_rdat;

  clock_generator u_clkgen (
    .clk, .rstreq, .halt(halt_req), .clk1, .clk2, .fetch, .rst, .halted(halt)
  );

  decoder u_decoder (
    .opcode(opcod), .clk1, .clk2, .fetch, .rst, .zr,
    .aclk, .ldac, .ldir, .ldpc, .mrd, .mwr, .pclk, .halt(halt_req)
  );

  instruction_register u_ir (
    .clk, .rst, .ldir, .mdat, .opcod, .adir
  );

  accumulator u_acc (
    .clk, .rst, .ldac, .alout, .acout
  );

  alu u_alu (
    .clk, .rst, .aclk, .acout, .mdat, .opcod, .alout, .zr
  );

  program_counter u_pc (
    .clk, .rst, .adir, .ldpc, .pclk, .adpc
  );

  multiplexer u_mux (
    .adir, .adpc, .fetch, .admen
  );

  memory #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_mem (
    .clk, .rst, .ead, .edat, .ewr, .mad(admen), .mrd, .mwr,
    .wdat(mdat), .rdat(mem_rdat), .rd_oe(mem_oe)
  );

  io_buffer u_iobuf (
    .alout, .mem_rdat, .mem_oe, .mrd, .fetch, .clk2, .mdat, .drive()
  );

endmodule
