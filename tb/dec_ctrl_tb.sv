// dec_ctrl_tb: drives the controller through load, decode and output with a
// stand-in for the processors' flags. Checks: 104 load writes in time order
// (segment, address); each issued step's row, time and per-column address
// (tau - a) mod 26 with wrap flag; the write-back address and wrap three
// clocks later; 104 steps plus 4 drain clocks per iteration; early
// termination after a clean iteration, or iter_max iterations when flags
// report unsatisfied checks; 104 output words in order under back-pressure.
module dec_ctrl_tb;
  import tbcc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] iter_max;
  logic et_en, in_valid, in_ready, load_we;
  logic [1:0] load_seg, s1_row, out_seg;
  logic [AW-1:0] load_addr, out_rd_addr, out_addr;
  logic s1_valid, flag_valid, flag_unsat, flag_changed, out_phase, out_valid, out_ready;
  logic [NCOL-1:0][AW-1:0] s1_addr, s4_addr;
  logic [NCOL-1:0] s1_wrap, s4_wrap;
  logic decoding, frame_done, early_stop;
  logic [3:0] frame_iters;
  int checks = 0, failures = 0;
  bit dirty;   // stand-in processors report unsatisfied checks

  dec_ctrl dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // flags follow s1_valid by three clocks, like the processors
  logic [2:0] vd = 3'b0;
  always_ff @(posedge clk) vd <= {vd[1:0], s1_valid};
  assign flag_valid = vd[2];
  assign flag_unsat = vd[2] & dirty;
  assign flag_changed = 1'b0;

  // address history for the write-back check
  logic [NCOL-1:0][AW-1:0] ah [3];
  logic [NCOL-1:0] wh [3];
  always_ff @(posedge clk) begin
    ah[0] <= s1_addr; ah[1] <= ah[0]; ah[2] <= ah[1];
    wh[0] <= s1_wrap; wh[1] <= wh[0]; wh[2] <= wh[1];
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(int imax, bit et, bit dirty_i, int exp_iters);
    int t = 0, steps = 0, cyc = 0, o = 0, g = 0;
    iter_max = 4'(imax); et_en = et; dirty = dirty_i;
    // load with gaps
    while (t < NTIME) begin
      @(negedge clk);
      in_valid = (g++ % 7 != 3);
      #1;
      if (in_valid && in_ready) begin
        chk(load_we && load_seg == 2'(t / SEG) && load_addr == AW'(t % SEG), "load order");
        t++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    // decode
    while (!out_phase) begin
      if (s1_valid) begin
        int tau = (steps / 4) % SEG, r = steps % 4;
        chk(s1_row == 2'(r), "row order");
        for (int j = 0; j < NCOL; j++) if (DELAY[r][j] >= 0) begin
          int d = tau - DELAY[r][j];
          chk(s1_wrap[j] == (d < 0) && int'(s1_addr[j]) == ((d + SEG) % SEG), "step address");
        end
        steps++;
      end
      if (vd[2]) chk(s4_addr == ah[2] && s4_wrap == wh[2], "write-back address delay");
      cyc++;
      @(negedge clk);
    end
    chk(steps == STEPS * exp_iters, $sformatf("steps %0d", steps));
    chk(cyc == 108 * exp_iters, $sformatf("decode clocks %0d", cyc));
    chk(frame_iters == 4'(exp_iters), "iterations");
    chk(early_stop == (exp_iters < imax), "early stop flag");
    // output with back-pressure
    while (o < NTIME) begin
      @(negedge clk);
      out_ready = (g++ % 3 != 1);
      #1;
      if (out_valid && out_ready) begin
        chk(out_seg == 2'(o / SEG) && out_addr == AW'(o % SEG), "output order");
        o++;
      end
    end
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    in_valid = 0; out_ready = 0; iter_max = 4; et_en = 0; dirty = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(4, 0, 0, 4);    // no early termination
    frame(8, 1, 0, 1);    // clean: stops after one iteration
    frame(3, 1, 1, 3);    // dirty: runs to the limit
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
