// register_file: 32 x 64-bit general register file, R0 wired to zero.
//
// Two read ports (Rs1, Rs2) and two write ports, as in the document's port
// table. Reads are combinational. Writes happen on the rising edge; a read of
// a register that is being written in the same cycle returns the new value,
// which is what the document obtains by reading and writing on opposite clock
// edges. If both write ports target the same register, port 2 wins (a choice
// of this design). Reset clears all registers.
module register_file #(
  parameter int unsigned W  = 64,
  parameter int unsigned AW = 5
) (
  input  logic          clk,
  input  logic          reset,
  input  logic [AW-1:0] Rs1_read_addr,
  input  logic [AW-1:0] Rs2_read_addr,
  input  logic [AW-1:0] Rs1_write_addr,
  input  logic [AW-1:0] Rs2_write_addr,
  input  logic [W-1:0]  Rs1_data_write,
  input  logic [W-1:0]  Rs2_data_write,
  input  logic          write_enable_1,
  input  logic          write_enable_2,
  output logic [W-1:0]  Rs1_data_read,
  output logic [W-1:0]  Rs2_data_read
);
  logic [W-1:0] regs [2**AW];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < 2**AW; i++) regs[i] <= '0;
    end else begin
      if (write_enable_1 && Rs1_write_addr != '0) regs[Rs1_write_addr] <= Rs1_data_write;
      if (write_enable_2 && Rs2_write_addr != '0) regs[Rs2_write_addr] <= Rs2_data_write;
    end
  end

  function automatic logic [W-1:0] rd(input logic [AW-1:0] a);
    if (a == '0)                               return '0;
    else if (write_enable_2 && Rs2_write_addr == a) return Rs2_data_write;
    else if (write_enable_1 && Rs1_write_addr == a) return Rs1_data_write;
    else                                       return regs[a];
  endfunction

  assign Rs1_data_read = rd(Rs1_read_addr);
  assign Rs2_data_read = rd(Rs2_read_addr);
endmodule
