// dp_mem: dual-port coefficient memory (MEM_A and MEM_B of the DWT stage).
//
// Two independent ports, each with one address: a write on a port takes
// effect at the clock edge, the read data of each port follows its address
// combinationally (distributed RAM, as a 16 x 16 tile needs no block RAM).
// Writing the same address from both ports in one cycle is not allowed; the
// DWT control never does it and asserts so.
module dp_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we1,
  input  logic [AW-1:0] addr1,
  input  logic [W-1:0]  wdata1,
  output logic [W-1:0]  rdata1,
  input  logic          we2,
  input  logic [AW-1:0] addr2,
  input  logic [W-1:0]  wdata2,
  output logic [W-1:0]  rdata2
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we1) mem[addr1] <= wdata1;
    if (we2) mem[addr2] <= wdata2;
  end

  assign rdata1 = mem[addr1];
  assign rdata2 = mem[addr2];
endmodule
