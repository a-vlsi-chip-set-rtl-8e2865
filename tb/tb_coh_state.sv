// tb_coh_state: walks every (state, processor request) and (state, snooped
// transaction) pair and compares with a table of the Berkeley Ownership
// protocol written out independently, then replays random multi-cache
// sequences and checks that at most one cache owns a block and that no
// cache holds a stale copy.
module tb_coh_state;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  coh_state_e cur, p_next, s_next; proc_req_e preq; bus_cmd_e p_bus, scmd; logic s_respond;
  coh_state_e st [4];
  coh_state_e nx [4];
  bus_cmd_e cmd;
  int owners;
  coh_state ucs (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // expected (next, bus) for a processor request: table as strings
  function automatic string pexp(coh_state_e c, proc_req_e r);
    case (r)
      PR_READ:  return (c == CS_INVALID) ? "UN/RS" : pgot(c, BUS_NONE);
      PR_FLUSH: return (c == CS_OWNSHARED || c == CS_OWNPRIVATE) ? "IN/WR" : "IN/-";
      default:  return (c == CS_INVALID) ? "OP/RFO" : (c == CS_OWNPRIVATE) ? "OP/-" : "OP/WFI";
    endcase
  endfunction
  function automatic string pgot(coh_state_e n, bus_cmd_e b);
    string sn, sb;
    sn = (n == CS_INVALID) ? "IN" : (n == CS_UNOWNED) ? "UN" : (n == CS_OWNPRIVATE) ? "OP" : "OS";
    sb = (b == BUS_NONE) ? "-" : (b == BUS_RS) ? "RS" : (b == BUS_RFO) ? "RFO" : (b == BUS_WFI) ? "WFI" : "WR";
    return {sn, "/", sb};
  endfunction
  initial begin
    // processor side table
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) begin
      string e, g;
      cur = coh_state_e'(c); preq = proc_req_e'(r); scmd = BUS_NONE; #1;
      e = pexp(cur, preq);
      if (e == "UNOWNED/-") e = "UN/-";
      if (e == "OWNSHARED/-") e = "OS/-";
      if (e == "OWNPRIVATE/-") e = "OP/-";
      g = pgot(p_next, p_bus);
      checks++;
      if (e != g) begin failures++; $display("FAIL proc %s %s got %s exp %s", cur.name(), preq.name(), g, e); end
    end
    // snoop side: owner responds to RS and RFO; RFO and WFI invalidate;
    // RS demotes OwnPrivate to OwnShared
    for (int c = 0; c < 4; c++) for (int b = 0; b < 5; b++) begin
      coh_state_e en; logic er;
      cur = coh_state_e'(c); scmd = bus_cmd_e'(b); preq = PR_READ; #1;
      er = (cur == CS_OWNSHARED || cur == CS_OWNPRIVATE) && (scmd == BUS_RS || scmd == BUS_RFO);
      en = cur;
      if (cur != CS_INVALID && (scmd == BUS_RFO || scmd == BUS_WFI)) en = CS_INVALID;
      if (cur == CS_OWNPRIVATE && scmd == BUS_RS) en = CS_OWNSHARED;
      checks++;
      if (s_next !== en || s_respond !== er) begin failures++; $display("FAIL snoop %s %s", cur.name(), scmd.name()); end
    end
    // system invariant over four caches sharing one block
    foreach (st[i]) st[i] = CS_INVALID;
    for (int t = 0; t < 2000; t++) begin
      int p; proc_req_e r;
      p = $urandom_range(0, 3); r = proc_req_e'($urandom_range(0, 3));
      cur = st[p]; preq = r; scmd = BUS_NONE; #1;
      cmd = p_bus; nx[p] = p_next;
      for (int q = 0; q < 4; q++) if (q != p) begin
        cur = st[q]; scmd = cmd; #1; nx[q] = s_next;
      end
      st = nx;
      owners = 0;
      for (int q = 0; q < 4; q++) if (st[q] == CS_OWNSHARED || st[q] == CS_OWNPRIVATE) owners++;
      checks++;
      if (owners > 1) begin failures++; $display("FAIL two owners"); end
      checks++;
      if (st[p] == CS_OWNPRIVATE)
        for (int q = 0; q < 4; q++) if (q != p && st[q] != CS_INVALID) begin failures++; $display("FAIL private not exclusive"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
