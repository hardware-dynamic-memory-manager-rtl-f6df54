// mm_memory: the SRAM whose space the memory manager hands out.
//
// 2^A_W words of D_W bits with two independent synchronous ports. Each port
// performs either a write (en=1, we=1) or a read (en=1, we=0) per cycle; read
// data appears on rdata in the next cycle and is held until the port's next
// read. The document specifies an SRAM but not its number of ports: two
// ports are this implementation's choice, because several control-unit
// states must update the header of the block itself and the header of a
// neighbouring block in the same cycle to meet the stated cycle counts.
// Writing the same address from both ports in one cycle is not allowed (the
// control unit never does); port 0 wins in that case.
module mm_memory #(
  parameter int A_W = 8,   // address width (words = 2^A_W)
  parameter int D_W = 32   // word width
) (
  input  logic           clk,
  input  logic           p0_en,
  input  logic           p0_we,
  input  logic [A_W-1:0] p0_addr,
  input  logic [D_W-1:0] p0_wdata,
  output logic [D_W-1:0] p0_rdata,
  input  logic           p1_en,
  input  logic           p1_we,
  input  logic [A_W-1:0] p1_addr,
  input  logic [D_W-1:0] p1_wdata,
  output logic [D_W-1:0] p1_rdata
);

  logic [D_W-1:0] mem [2**A_W];

  always_ff @(posedge clk) begin
    if (p1_en && p1_we) mem[p1_addr] <= p1_wdata;
    if (p0_en && p0_we) mem[p0_addr] <= p0_wdata;
  end

  always_ff @(posedge clk) begin
    if (p0_en && !p0_we) p0_rdata <= mem[p0_addr];
    if (p1_en && !p1_we) p1_rdata <= mem[p1_addr];
  end

endmodule
