// sram_model: behavioural model of an external dual-port synchronous SRAM
// (pointer memory or cell buffer memory of the buffer manager).
// One write port and one read port on the same clock; a read returns the
// word one clock after the request (the data register holds otherwise);
// a read and a write of the same word on the same clock return the old word.
// Contents start at zero; the read register is undefined until the first
// read.
module sram_model #(
  parameter int unsigned AW = 13,
  parameter int unsigned DW = 36
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    foreach (mem[i]) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
