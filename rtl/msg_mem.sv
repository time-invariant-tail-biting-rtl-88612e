// msg_mem: one memory bank of the decoder, one read and one write port.
//
// Every bank of the decoder holds one variable column of one processor
// segment: word x is the data of the variable group at local time instant x.
// Message banks store all slots of the group (degree x 36 bits), decision
// banks the 6 hard-decision bits. The read is synchronous: the word at
// rd_addr appears on rd_data one clock after rd_en. A read and a write of the
// same address in one cycle return the old word; the decoding schedule never
// needs the new one (see proc_unit). Written as an array so that synthesis
// maps it to a memory macro; the source design uses SRAM banks of this shape.
module msg_mem #(
  parameter int unsigned W     = 36,
  parameter int unsigned DEPTH = 26,
  parameter int unsigned AW    = 5
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end
endmodule
