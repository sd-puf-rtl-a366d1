// mcell_memory: the small non-volatile STT-mCell memory that keeps each PUF's mask.
//
// DEPTH words of W bits. A write (en and we) stores data_in at addr; a read (en,
// not we) returns the word on data_out at the next rising edge. The array has no
// reset because the real memory is non-volatile and keeps its contents through
// power-down; only data_out is reset. Depth, the write-enable pin and the
// one-cycle read latency are this design's choices: the design description names
// Mem_en, Mem_Addr, Data_in and Data_out but gives no size. Written as an array, it
// maps onto a memory macro.
module mcell_memory #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned W     = sd_puf_pkg::MASK_W,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  data_in,
  output logic [W-1:0]  data_out
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && we) mem[addr] <= data_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          data_out <= '0;
    else if (en && !we)  data_out <= mem[addr];
  end

endmodule
