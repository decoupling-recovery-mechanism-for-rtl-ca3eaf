// tb_scheduling_window: random allocation, wakeup and select against a model.
//
// Each cycle the test writes up to eight new instructions (never more than
// the free count), broadcasts random results (including corrections of values
// sources already hold) and sets a random issue limit. The model keeps every
// waiting instruction with its operand state. Checked every cycle: the free
// count; every dispatched instruction is one the model holds with both
// sources ready and the latest values; nothing is dispatched twice or beyond
// the issue limit; selection is work-conserving (as many dispatches as the
// limit and the ready instructions allow); dispatched entries are released.
`timescale 1ns/1ps
module tb_scheduling_window;
  import dw_pkg::*;
  localparam int E = 64, NA = 8, NI = 8, NR = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    [NA-1:0] alloc_valid;
  uop_t    [NA-1:0] alloc_uop;
  logic    [6:0]    free_count;
  logic    [NR-1:0] res_valid;
  result_t [NR-1:0] res;
  logic    [3:0]    issue_limit;
  logic    [NI-1:0] iss_valid;
  uop_t    [NI-1:0] iss_uop;

  scheduling_window dut (.*);

  uop_t model [int];
  int checks = 0, failures = 0, next_tag = 0, n_iss = 0, n_corr = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL at %0t: %s", $time, msg); end
  endtask

  function automatic src_t rnd_src();
    src_t s;
    s = '0;
    case ($urandom_range(0, 2))
      0: begin s.ready = 1; s.value = $urandom; end                    // register
      1: begin s.live = 1; s.tag = tag_t'($urandom_range(0, 31)); end  // waiting
      default: begin s.ready = 1; s.live = 1; s.tag = tag_t'($urandom_range(0, 31)); s.value = $urandom; end
    endcase
    return s;
  endfunction

  function automatic src_t upd(src_t s);
    for (int r = 0; r < NR; r++)
      if (res_valid[r] && s.live && s.tag == res[r].tag) begin s.ready = 1; s.value = res[r].value; end
    return s;
  endfunction

  initial begin
    alloc_valid = '0; alloc_uop = '0; res_valid = '0; res = '0; issue_limit = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int na, nready, nexp;
      bit seen [int];
      @(negedge clk);
      seen.delete();
      // stimulus
      issue_limit = 4'($urandom_range(0, 8));
      na = $urandom_range(0, (t % 200 < 100) ? 8 : 2);
      if (na > E - model.num()) na = E - model.num();
      alloc_valid = '0;
      for (int k = 0; k < NA; k++) begin
        alloc_uop[k] = '0;
        if (k < na) begin
          alloc_valid[k] = 1;
          while (model.exists(next_tag % 256)) next_tag++;
          alloc_uop[k].tag = tag_t'(next_tag % 256);
          alloc_uop[k].op  = OP_ADD;
          alloc_uop[k].s1  = rnd_src();
          alloc_uop[k].s2  = rnd_src();
          next_tag++;
        end
      end
      for (int r = 0; r < NR; r++) begin
        res_valid[r] = ($urandom_range(0, 3) == 0);
        res[r].tag = tag_t'($urandom_range(0, 31));
        res[r].value = $urandom;
        res[r].ver = '0;
      end
      #1;
      // checks against the model state before this edge
      check(int'(free_count) == E - model.num(), $sformatf("free %0d expected %0d", free_count, E - model.num()));
      nready = 0;
      foreach (model[k]) if (model[k].s1.ready && model[k].s2.ready) nready++;
      nexp = (nready < int'(issue_limit)) ? nready : int'(issue_limit);
      check($countones(iss_valid) == nexp, $sformatf("dispatched %0d expected %0d", $countones(iss_valid), nexp));
      for (int k = 0; k < NI; k++) if (iss_valid[k]) begin
        int tg;
        tg = int'(iss_uop[k].tag);
        check(model.exists(tg) && !seen.exists(tg), $sformatf("tag %0d dispatched unexpectedly", tg));
        if (model.exists(tg)) begin
          check(model[tg].s1.ready && model[tg].s2.ready, "dispatched before ready");
          check(iss_uop[k] == model[tg], "dispatched operands differ from the model");
          model.delete(tg);
        end
        seen[tg] = 1;
        n_iss++;
      end
      @(posedge clk);
      foreach (model[k]) begin
        uop_t u;
        u = model[k];
        if (u.s1.ready && u.s1.live && res_valid != 0) n_corr++;
        u.s1 = upd(u.s1);
        u.s2 = upd(u.s2);
        model[k] = u;
      end
      for (int k = 0; k < NA; k++) if (alloc_valid[k]) model[int'(alloc_uop[k].tag)] = alloc_uop[k];
    end
    check(n_iss > 1000, "too few dispatches");
    $display("dispatched %0d", n_iss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
