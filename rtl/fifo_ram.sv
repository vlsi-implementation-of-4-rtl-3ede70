// fifo_ram: single-port storage of the input FIFO.
//
// One address and one read/write line, as in the original design: with
// rw = 1 the word `diram` is written at `addr`; with rw = 0 and en = 1 the
// word at `addr` is read into the `doram` register, which holds it until the
// next read. Both take effect at the rising clock edge, so read data
// appears the cycle after the read. The stored words are not reset.
module fifo_ram #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 16,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,     // access this cycle
  input  logic              rw,     // 1 = write, 0 = read
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] diram,
  output logic [DATA_W-1:0] doram
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && rw)  mem[addr] <= diram;
    if (en && !rw) doram     <= mem[addr];
  end

endmodule
