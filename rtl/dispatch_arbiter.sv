// dispatch_arbiter: decides which structure's instructions reach the
// functional units in a cycle.
//
// Normally every instruction is dispatched from the scheduling window; the
// instruction buffer only dispatches reissued instructions. The window is
// therefore served first: it is told how many units are free (win_limit) and
// its k-th dispatched instruction goes to the k-th free unit. Reissue requests
// from the buffer then take the units that are still free, in request order;
// a request without a unit is not granted and the buffer selects it again
// later. Giving the window priority, and the in-order assignment, are this
// implementation's choices. Purely combinational.
//
// Window instructions are turned into unit requests here, taking the operand
// values they carry and the entry version reported by the buffer.
module dispatch_arbiter
  import dw_pkg::*;
#(
  parameter int unsigned NFU = 8,
  parameter int unsigned NWIN = 8,
  parameter int unsigned NRE = 8
)(
  input  logic    [NFU-1:0]           fu_ready,
  output logic    [$clog2(NWIN+1)-1:0] win_limit,
  input  logic    [NWIN-1:0]          win_valid,
  input  uop_t    [NWIN-1:0]          win_uop,
  input  ver_t    [NWIN-1:0]          win_ver,
  input  logic    [NRE-1:0]           rs_valid,
  input  fu_req_t [NRE-1:0]           rs_req,
  output logic    [NRE-1:0]           rs_grant,
  output logic    [NFU-1:0]           fu_valid,
  output fu_req_t [NFU-1:0]           fu_req
);

  always_comb begin
    int unsigned nfree;
    nfree = 0;
    for (int f = 0; f < NFU; f++) if (fu_ready[f]) nfree++;
    win_limit = (nfree > NWIN) ? ($clog2(NWIN+1))'(NWIN) : ($clog2(NWIN+1))'(nfree);
  end

  always_comb begin
    int unsigned w;
    logic [NFU-1:0] taken;
    w = 0;
    taken    = '0;
    fu_valid = '0;
    fu_req   = '0;
    rs_grant = '0;
    // window first
    for (int f = 0; f < NFU; f++) begin
      if (fu_ready[f] && w < NWIN && win_valid[w]) begin
        fu_valid[f]   = 1'b1;
        fu_req[f].tag = win_uop[w].tag;
        fu_req[f].ver = win_ver[w];
        fu_req[f].op  = win_uop[w].op;
        fu_req[f].a   = win_uop[w].s1.value;
        fu_req[f].b   = win_uop[w].s2.value;
        taken[f]      = 1'b1;
        w++;
      end
    end
    // then the buffer's reissues
    for (int q = 0; q < NRE; q++) begin
      logic done;
      done = 1'b0;
      if (rs_valid[q])
        for (int f = 0; f < NFU; f++)
          if (!done && fu_ready[f] && !taken[f]) begin
            fu_valid[f] = 1'b1;
            fu_req[f]   = rs_req[q];
            rs_grant[q] = 1'b1;
            taken[f]    = 1'b1;
            done        = 1'b1;
          end
    end
  end

endmodule
