// tb_diff_selector: random current and past states (past states made close to the current
// one by flipping a random number of bits) with random valid flags; checks found, the
// minimum count, the tie rule (lowest index) and the change mask against $countones.
module tb_diff_selector;
  localparam int N_R = 200, N_H = 4, HW = 2, CW = $clog2(N_R + 1);
  logic [N_R-1:0] cur;
  logic [N_H-1:0][N_R-1:0] hist_state;
  logic [N_H-1:0] hist_valid;
  logic found;
  logic [HW-1:0] sel;
  logic [CW-1:0] sel_count;
  logic [N_R-1:0] sel_diff;
  int checks = 0, failures = 0;

  diff_selector #(.N_R(N_R), .N_H(N_H)) dut (.cur, .hist_state, .hist_valid, .found, .sel,
                                            .sel_count, .sel_diff);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel_hits [N_H];
    for (int t = 0; t < 2000; t++) begin
      bit ef; int es, ec;
      for (int j = 0; j < N_R; j++) cur[j] = $urandom % 2;
      for (int h = 0; h < N_H; h++) begin
        int nflip;
        hist_state[h] = cur;
        nflip = int'($urandom % 30);
        for (int f = 0; f < nflip; f++) hist_state[h][$urandom % N_R] ^= 1'b1;
      end
      if (t % 5 == 0) hist_state[2] = hist_state[1];    // force ties
      hist_valid = (t % 10 == 0) ? '0 : N_H'($urandom);
      #1;
      ef = 0; es = 0; ec = 0;
      for (int h = 0; h < N_H; h++)
        if (hist_valid[h] && (!ef || $countones(cur ^ hist_state[h]) < ec)) begin
          ef = 1; es = h; ec = $countones(cur ^ hist_state[h]);
        end
      checks++;
      if (found !== ef || (ef && (sel !== HW'(es) || sel_count !== CW'(ec) ||
                                  sel_diff !== (cur ^ hist_state[es])))) begin
        failures++;
        if (failures < 5) $display("t=%0d found=%b sel=%0d cnt=%0d exp %b %0d %0d", t, found, sel, sel_count, ef, es, ec);
      end
      if (ef) sel_hits[es]++;
      #9;
    end
    for (int h = 0; h < N_H; h++) begin
      checks++;
      if (sel_hits[h] == 0) begin failures++; $display("entry %0d never selected", h); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
