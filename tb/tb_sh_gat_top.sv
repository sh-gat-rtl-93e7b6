// tb_sh_gat_top: two GAT layers end to end on sh_gat_top at its default
// parameters, on a small random graph (40 nodes, 48 input features, one hub
// of 20 neighbours). See tb_gat_harness for what is checked.
module tb_sh_gat_top;
  logic done;
  int   checks, failures;

  tb_gat_harness #(.NODES(40), .IN_DIM(48), .DENS_PM(150), .AVG_DEG(4),
                   .HUB_DEG(20), .NHUBS(1), .VALID_PCT(75), .LAYERS(2), .CLASSES(7), .NAME("small")) u_h (
    .done(done), .n_checks(checks), .n_failures(failures));

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge u_h.clk);
    $display("watchdog: %0d outputs", u_h.nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
