// dec_ctrl: decoder controller and address generator.
//
// Phases of one decoding job:
//   LOAD   104 input time instants are accepted (valid/ready), one per clock,
//          filling segment 0 addresses 0..25, then segment 1, and so on.
//   DECODE every clock one layer step is issued to all four processors at
//          once: local time tau = 0..25, and for each tau the layers 0..3.
//          Messages are never shifted between processors; only this address
//          moves, so the iteration count is free and not tied to the
//          number of processors. For column j the variable address is
//          (tau - a(r,j)) mod 26 with a wrap flag when tau < a(r,j); the same
//          address and flag, delayed by three clocks, steer the write-back.
//   DRAIN  after the 104th step of an iteration the pipeline empties (four
//          clocks, until the last write-back has been counted). Early termination then ends decoding if the iteration
//          saw no unsatisfied check and no changed hard decision; otherwise
//          the next iteration starts, up to iter_max iterations.
//   OUTPUT the 104 time instants of hard decisions are read out (valid/ready),
//          one per clock after one priming clock.
// Decoding takes 108 clocks per iteration; with four processors each step
// covers 4 x 6 checks, so 4 iterations of a 2496-bit message take 432 clocks.
// Early termination covers all frames of the memory together in the modes
// with several small frames. iter_max = 0 is treated as 1.
module dec_ctrl
  import tbcc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [3:0]                iter_max,
  input  logic                      et_en,
  // load
  input  logic                      in_valid,
  output logic                      in_ready,
  output logic                      load_we,
  output logic [1:0]                load_seg,
  output logic [AW-1:0]             load_addr,
  // layer step issue (S1) and write-back (S4)
  output logic                      s1_valid,
  output logic [1:0]                s1_row,
  output logic [NCOL-1:0][AW-1:0]   s1_addr,
  output logic [NCOL-1:0]           s1_wrap,
  output logic [NCOL-1:0][AW-1:0]   s4_addr,
  output logic [NCOL-1:0]           s4_wrap,
  input  logic                      flag_valid,
  input  logic                      flag_unsat,
  input  logic                      flag_changed,
  // output
  output logic                      out_phase,
  output logic [AW-1:0]             out_rd_addr,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [1:0]                out_seg,
  output logic [AW-1:0]             out_addr,
  // status
  output logic                      decoding,
  output logic                      frame_done,
  output logic [3:0]                frame_iters,
  output logic                      early_stop
);
  typedef enum logic [2:0] {S_LOAD, S_DEC, S_DRAIN, S_OPRIME, S_OUT} state_e;
  state_e state;

  logic [1:0]    seg_q;
  logic [AW-1:0] addr_q;
  logic [AW-1:0] tau;
  logic [1:0]    row;
  logic [3:0]    iter;
  logic          unsat_acc, changed_acc;
  logic [2:0]    pv;

  logic [NCOL-1:0][AW-1:0] a_d1, a_d2, a_d3;
  logic [NCOL-1:0]         w_d1, w_d2, w_d3;

  wire last_pos  = (seg_q == 2'(NPROC-1)) && (addr_q == AW'(SEG-1));
  wire in_fire   = (state == S_LOAD) && in_valid;
  wire out_fire  = (state == S_OUT) && out_ready;
  wire [3:0] iters_done = iter + 4'd1;
  wire stop_now  = (et_en && !unsat_acc && !changed_acc) ||
                   (iters_done >= iter_max);

  assign in_ready  = (state == S_LOAD);
  assign load_we   = in_fire;
  assign load_seg  = seg_q;
  assign load_addr = addr_q;
  assign s1_valid  = (state == S_DEC);
  assign s1_row    = row;
  assign out_phase = (state == S_OPRIME) || (state == S_OUT);
  assign out_valid = (state == S_OUT);
  assign out_seg   = seg_q;
  assign out_addr  = addr_q;
  assign decoding  = (state == S_DEC) || (state == S_DRAIN);

  // Address of the next output word, read one clock ahead.
  always_comb begin
    out_rd_addr = addr_q;
    if (out_fire) out_rd_addr = (addr_q == AW'(SEG-1)) ? '0 : addr_q + 1'b1;
  end

  // Variable addresses of the issued step.
  always_comb begin
    for (int j = 0; j < int'(NCOL); j++) begin
      int d;
      d = int'(tau) - (has_edge(int'(row), j) ? DELAY[row][j] : 0);
      s1_wrap[j] = (d < 0);
      s1_addr[j] = AW'((d < 0) ? d + int'(SEG) : d);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_d1 <= '0; a_d2 <= '0; a_d3 <= '0;
      w_d1 <= '0; w_d2 <= '0; w_d3 <= '0;
      pv   <= '0;
    end else begin
      a_d1 <= s1_addr; a_d2 <= a_d1; a_d3 <= a_d2;
      w_d1 <= s1_wrap; w_d2 <= w_d1; w_d3 <= w_d2;
      pv   <= {pv[1:0], s1_valid};
    end
  end
  assign s4_addr = a_d3;
  assign s4_wrap = w_d3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_LOAD;
      seg_q       <= '0;
      addr_q      <= '0;
      tau         <= '0;
      row         <= '0;
      iter        <= '0;
      unsat_acc   <= 1'b0;
      changed_acc <= 1'b0;
      frame_done  <= 1'b0;
      frame_iters <= '0;
      early_stop  <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (flag_valid) begin
        unsat_acc   <= unsat_acc   | flag_unsat;
        changed_acc <= changed_acc | flag_changed;
      end
      case (state)
        S_LOAD: if (in_fire) begin
          if (last_pos) begin
            seg_q       <= '0;
            addr_q      <= '0;
            state       <= S_DEC;
            tau         <= '0;
            row         <= '0;
            iter        <= '0;
            unsat_acc   <= 1'b0;
            changed_acc <= 1'b0;
          end else if (addr_q == AW'(SEG-1)) begin
            addr_q <= '0;
            seg_q  <= seg_q + 1'b1;
          end else begin
            addr_q <= addr_q + 1'b1;
          end
        end
        S_DEC: begin
          row <= row + 1'b1;
          if (row == 2'(NROW-1)) begin
            tau <= tau + 1'b1;
            if (tau == AW'(SEG-1)) begin
              tau   <= '0;
              state <= S_DRAIN;
            end
          end
        end
        S_DRAIN: if (pv == '0) begin
          if (stop_now) begin
            state       <= S_OPRIME;
            frame_iters <= iters_done;
            early_stop  <= iters_done < iter_max;
          end else begin
            iter        <= iters_done;
            state       <= S_DEC;
            unsat_acc   <= 1'b0;
            changed_acc <= 1'b0;
          end
        end
        S_OPRIME: state <= S_OUT;
        S_OUT: if (out_fire) begin
          if (last_pos) begin
            seg_q      <= '0;
            addr_q     <= '0;
            state      <= S_LOAD;
            frame_done <= 1'b1;
          end else if (addr_q == AW'(SEG-1)) begin
            addr_q <= '0;
            seg_q  <= seg_q + 1'b1;
          end else begin
            addr_q <= addr_q + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // A step is only issued while decoding; the write-back follows 3 clocks later.
  assert property (@(posedge clk) disable iff (!rst_n) flag_valid |-> pv[2]);
endmodule
