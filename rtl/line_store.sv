// line_store: one video line of memory for the two-dimensional delta
// modulator, LINE_LEN words of WIDTH bits.
//
// Each word holds the state of one reconstructed pixel of the line above
// (estimate, step magnitude, last delta bit), which the vertical delta
// modulator continues from. A pixel reads its column and the new state is
// written back to the same column, so the read is asynchronous and returns
// the old word during a write (write at the rising edge). This is how a
// static RAM of the era is used; the organisation is this design's choice.
//
// The array is not reset: the codec does not read a column on the first
// line of a frame before it has written it.
module line_store #(
  parameter int unsigned LINE_LEN = adm_pkg::ADM_LINE_LEN,
  parameter int unsigned WIDTH    = 13,
  parameter int unsigned ADDR_W   = $clog2(LINE_LEN)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [LINE_LEN];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

endmodule
