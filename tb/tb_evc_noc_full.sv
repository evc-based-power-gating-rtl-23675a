// tb_evc_noc_full: end-to-end test of the EVC power-gated mesh at its
// default size (8x8, every parameter at its default value; the mesh is
// instantiated with no parameter list inside evc_noc_tester). Phases,
// scoreboard and mechanism counts are those of evc_noc_tester.
module tb_evc_noc_full;
  evc_noc_tester u_test ();
endmodule
