// multiplexer: memory address select.
//
// While fetch is high (the four fetch phases) the program counter adpc
// addresses memory; while fetch is low the address field adir of the
// instruction register does. Combinational. Follows the description.
module multiplexer (
  input  risc8_pkg::addr_t adir,
  input  risc8_pkg::addr_t adpc,
  input  logic             fetch,
  output risc8_pkg::addr_t admen
);

  assign admen = fetch ? adpc : adir;

endmodule
