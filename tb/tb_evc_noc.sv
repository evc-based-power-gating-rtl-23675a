// tb_evc_noc: end-to-end test of the EVC power-gated mesh on a reduced
// 4x4 mesh (all router settings at their defaults). See evc_noc_tester for
// the phases, the scoreboard and the mechanism counts.
module tb_evc_noc;
  evc_noc_tester #(.MX(4), .MY(4)) u_test ();
endmodule
