// instruction_memory: 512 x 32-bit program store of the PLX processor.
//
// The standard port is the read address addra with data out douta. The
// "hidden" initialisation port loads the program: while wea is high the word
// dina is written to addra on each rising edge (the processor is held in
// stall meanwhile, which the top level does). Size and port names follow the
// document; it uses a vendor block-RAM generator, here the memory is a plain
// array. The read is asynchronous so that fetch and the PC update fit in one
// pipeline stage (the document gets the same effect by clocking the PC and the
// memory on opposite edges).
module instruction_memory #(
  parameter int unsigned AW = 9,
  parameter int unsigned DW = 32
) (
  input  logic          clka,
  input  logic          wea,
  input  logic [AW-1:0] addra,
  input  logic [DW-1:0] dina,
  output logic [DW-1:0] douta
);
  logic [DW-1:0] mem [2**AW];

  // power-up contents are zero (FPGA block RAM initial value)
  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always_ff @(posedge clka) begin
    if (wea) mem[addra] <= dina;
  end

  assign douta = mem[addra];
endmodule
