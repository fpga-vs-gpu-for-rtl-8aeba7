// vector_bram: one lane's on-chip copy of the input vector x ("vec BRAM").
//
// Every dot-product lane holds a full copy of x so that the five lanes can read
// five random entries per cycle. The host loads x through the write port before
// the matrix is streamed; all lanes share that write port. The read port is
// addressed by the column index of the incoming matrix value and returns the
// entry one cycle later (synchronous read, as a block RAM does). The depth of
// 2^16 entries follows from the 16-bit column index of the document's data
// format; the memory has no reset, as block RAM contents have none.
module vector_bram #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 64,
  parameter int unsigned DEPTH  = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
