// tb_venturini_cell: with PERIOD = 200 loads random on-times (adding up to
// the period) and every input sector, and records the switch pattern over
// the following period (h is registered: one clock after the position). It checks that exactly one switch is on in every
// cycle, that the inputs are visited in the published symmetric orders
// (sector 5/2: C A B A C, 6/1: A B C B A, 3/4: B C A C B, with A, B, C the
// inputs 1, 2, 3) and that each segment lasts t_P/2, t_Q/2, t_R, t_Q/2 and
// the rest of the period (segments of zero length are skipped).
module tb_venturini_cell;
  import davpwm_pkg::*;

  localparam int unsigned PERIOD = 200;
  localparam int unsigned TW = $clog2(PERIOD + 1);

  logic          clk = 0, rst_n = 0, load = 0;
  logic [TW-1:0] t [NIN];
  sector_t       si;
  logic [NIN-1:0] h;
  int            checks = 0, failures = 0;
  int            seen_order [3];

  venturini_cell #(.PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (h != 3'b001) failures++;
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int ta [3], p, q, r, seg_in [$], seg_len [$], exp_in [$], exp_len [$];
      sector_t s;
      seg_in.delete(); seg_len.delete(); exp_in.delete(); exp_len.delete();
      s = sector_t'(1 + n % 6);
      ta[0] = $urandom % (PERIOD + 1);
      ta[1] = $urandom % (PERIOD - ta[0] + 1);
      ta[2] = PERIOD - ta[0] - ta[1];
      if (n % 10 == 3) begin ta[0] = PERIOD; ta[1] = 0; ta[2] = 0; end
      unique case (s)
        3'd5, 3'd2: begin p = 2; q = 0; r = 1; seen_order[0]++; end
        3'd6, 3'd1: begin p = 0; q = 1; r = 2; seen_order[1]++; end
        default:    begin p = 1; q = 2; r = 0; seen_order[2]++; end
      endcase
      @(negedge clk);
      for (int k = 0; k < 3; k++) t[k] = TW'(ta[k]);
      si = s; load = 1;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < 3; k++) t[k] = TW'($urandom);
      si = sector_t'($urandom);
      @(negedge clk);
      // h is registered: the period's pattern occupies the next PERIOD cycles.
      for (int c = 0; c < PERIOD; c++) begin
        int idx;
        checks++;
        if (!$onehot(h)) failures++;
        idx = (h == 3'b001) ? 0 : (h == 3'b010) ? 1 : 2;
        if (seg_in.size() == 0 || seg_in[$] != idx) begin
          seg_in.push_back(idx); seg_len.push_back(1);
        end else seg_len[$] = seg_len[$] + 1;
        if (c != PERIOD - 1) @(negedge clk);
      end
      // Expected segments, zero lengths dropped and neighbours merged.
      begin
        int li [5], ll [5], used;
        li = '{p, q, r, q, p};
        ll = '{ta[p] / 2, ta[q] / 2, ta[r], ta[q] / 2, 0};
        used = ll[0] + ll[1] + ll[2] + ll[3];
        ll[4] = PERIOD - used;
        for (int i = 0; i < 5; i++)
          if (ll[i] > 0) begin
            if (exp_in.size() > 0 && exp_in[$] == li[i]) exp_len[$] = exp_len[$] + ll[i];
            else begin exp_in.push_back(li[i]); exp_len.push_back(ll[i]); end
          end
      end
      checks++;
      if (seg_in != exp_in || seg_len != exp_len) begin
        failures++;
        $display("FAIL n=%0d si=%0d t=%0d %0d %0d got %p %p exp %p %p", n, s, ta[0], ta[1], ta[2],
                 seg_in, seg_len, exp_in, exp_len);
      end
    end
    checks++;
    if (seen_order[0] == 0 || seen_order[1] == 0 || seen_order[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
