// tb_dispatch_arbiter: random unit availability, window dispatches and buffer
// reissue requests. Checks that the window is told how many units are free,
// that its k-th instruction lands on the k-th free unit with its operands and
// version, that reissue requests get the remaining free units in request
// order, that nothing is sent to a busy unit, and that grants are exactly the
// requests that received a unit.
`timescale 1ns/1ps
module tb_dispatch_arbiter;
  import dw_pkg::*;
  localparam int NFU = 8, NW = 8, NRE = 8;

  logic    [NFU-1:0] fu_ready;
  logic    [3:0]     win_limit;
  logic    [NW-1:0]  win_valid;
  uop_t    [NW-1:0]  win_uop;
  ver_t    [NW-1:0]  win_ver;
  logic    [NRE-1:0] rs_valid;
  fu_req_t [NRE-1:0] rs_req;
  logic    [NRE-1:0] rs_grant;
  logic    [NFU-1:0] fu_valid;
  fu_req_t [NFU-1:0] fu_req;
  int checks = 0, failures = 0, n_rs_granted = 0;

  dispatch_arbiter dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int nfree, nw, f, q;
      fu_ready = NFU'($urandom);
      rs_valid = NRE'($urandom);
      for (int k = 0; k < NW; k++) begin
        win_uop[k] = uop_t'({$urandom, $urandom, $urandom, $urandom});
        win_ver[k] = ver_t'($urandom);
        rs_req[k]  = fu_req_t'({$urandom, $urandom, $urandom});
      end
      #1;
      nfree = $countones(fu_ready);
      check(int'(win_limit) == nfree, "win_limit");
      nw = $urandom_range(0, nfree);
      win_valid = '0;
      for (int k = 0; k < nw; k++) win_valid[k] = 1;
      #1;
      check((fu_valid & ~fu_ready) == 0, "request sent to a busy unit");
      // window instructions on the first free units
      f = 0;
      for (int k = 0; k < nw; k++) begin
        while (!fu_ready[f]) f++;
        check(fu_valid[f] && fu_req[f].tag == win_uop[k].tag && fu_req[f].op == win_uop[k].op &&
              fu_req[f].a == win_uop[k].s1.value && fu_req[f].b == win_uop[k].s2.value &&
              fu_req[f].ver == win_ver[k], $sformatf("window instruction %0d", k));
        f++;
      end
      // reissues on the rest, in request order
      q = 0;
      for (int u = f; u < NFU; u++) if (fu_ready[u]) begin
        while (q < NRE && !rs_valid[q]) q++;
        if (q < NRE) begin
          check(fu_valid[u] && fu_req[u] == rs_req[q] && rs_grant[q], $sformatf("reissue %0d", q));
          q++;
          n_rs_granted++;
        end else check(!fu_valid[u], "unit used without a request");
      end
      for (int r = q; r < NRE; r++) check(!rs_grant[r], "grant without a unit");
      check((rs_grant & ~rs_valid) == 0, "grant without a request");
    end
    check(n_rs_granted > 100, "too few reissue grants");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
