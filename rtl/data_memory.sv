// data_memory: 1024 x 64-bit data memory of stage 4.
//
// Single port: in a cycle either a read or a write is done. Each of the
// eight bytes of a word has its own write enable (wea), so subword stores
// need no read-modify-write (document, sections 2.6 and 5.4.1). The
// document generates it as a vendor block RAM clocked on the falling edge;
// here it is an array written on the rising edge with a combinational read,
// which gives the same single-cycle access inside stage 4. Addresses are
// word addresses. The contents are not reset.
module data_memory #(
  parameter int unsigned AW = 10
) (
  input  logic          clka,
  input  logic [7:0]    wea,
  input  logic [AW-1:0] addr,
  input  logic [63:0]   dina,
  output logic [63:0]   dout
);
  logic [63:0] mem [2**AW];

  // power-up contents are zero (FPGA block RAM initial value)
  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always_ff @(posedge clka) begin
    for (int i = 0; i < 8; i++)
      if (wea[i]) mem[addr][8*i +: 8] <= dina[8*i +: 8];
  end

  assign dout = mem[addr];
endmodule
