// ipn: inter-processor permutation network for one variable column.
//
// The message memory is split into four segments of 26 time instants, one
// per processor. A check of processor q at local time tau reaches the
// variable at tau - a; when that is negative the variable lies in the
// previous segment of the same frame (the frame is tail-biting, so the
// previous segment of the first one is the last one). Which segment that is
// depends on the frame size mode:
//   one-processor frames  : the processor's own segment (wraps onto itself)
//   two-processor frames  : the partner in the pair {0,1} or {2,3}
//   four-processor frames : segment q-1 modulo 4
// All processors work on the same local time and layer, so for one column
// either all of them wrap or none does, and each segment bank is used by
// exactly one processor: the network is a rotation, built from multiplexers.
// The read side routes segment words to processors, the write side routes
// processor words (and write enables) back. Purely combinational.
module ipn
  import tbcc_pkg::*;
#(
  parameter int unsigned W = 36
) (
  input  fmode_e              mode,
  input  logic                rd_wrap,
  input  logic [NPROC-1:0][W-1:0] seg_rdata,
  output logic [NPROC-1:0][W-1:0] proc_rdata,
  input  logic                wr_wrap,
  input  logic [NPROC-1:0]        proc_we,
  input  logic [NPROC-1:0][W-1:0] proc_wdata,
  output logic [NPROC-1:0]        seg_we,
  output logic [NPROC-1:0][W-1:0] seg_wdata
);
  always_comb begin
    seg_we    = '0;
    seg_wdata = '0;
    for (int q = 0; q < int'(NPROC); q++) begin
      logic [1:0] rs, ws;
      rs = rd_wrap ? pred_seg(2'(q), mode) : 2'(q);
      ws = wr_wrap ? pred_seg(2'(q), mode) : 2'(q);
      proc_rdata[q] = seg_rdata[rs];
      if (proc_we[q]) begin
        seg_we[ws]    = 1'b1;
        seg_wdata[ws] = proc_wdata[q];
      end
    end
  end
endmodule
