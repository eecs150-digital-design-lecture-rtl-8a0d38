// Single-ported memory that holds the linked list.
//
// 2**ADDR_W words of DATA_W bits (256 x 8 by default). A read is
// asynchronous: D follows A combinationally, as the list processors expect
// (they address the memory and use the word in the same cycle). The one
// address port is shared with a write path used to load the list: while WE
// is high the port is addressed by WA and WD is written on the rising edge;
// otherwise it is addressed by A. The write path is this design's addition,
// since the processors only read. The contents have no reset.
module list_mem #(
  parameter int unsigned ADDR_W = lp_pkg::ADDR_W,
  parameter int unsigned DATA_W = lp_pkg::DATA_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] a,   // read address from the processor
  output logic [DATA_W-1:0] d,   // read data
  input  logic              we,  // load port: write enable
  input  logic [ADDR_W-1:0] wa,  // load port: address
  input  logic [DATA_W-1:0] wd   // load port: data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];
  logic [ADDR_W-1:0] port_a;

  assign port_a = we ? wa : a;
  assign d      = mem[port_a];

  always_ff @(posedge clk) begin
    if (we) mem[port_a] <= wd;
  end

endmodule
