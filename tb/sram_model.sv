// Behavioural model of the CPU's external static RAM, for simulation
// only. 64K words of 16 bits, shared by instructions
// and data. Reads are asynchronous: rdata follows addr. A write takes wdata
// into mem[addr] at a rising clock edge while we is high. Testbenches load
// and inspect the contents through the mem array directly.
module sram_model #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  input  logic          we,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
