// tb_sh_gat_datasets: the two-layer GAT model (16 hidden features) on
// sh_gat_top at its default parameters,
// for graphs with the sizes of the Cora, CiteSeer and PubMed citation datasets
// (nodes, input feature dimension, feature density, average degree and the
// largest neighbour list), with random contents. The three layers run side by
// side on three instances. See tb_gat_harness for what is checked; the cycle
// count of each layer is printed.
module tb_sh_gat_datasets;
  logic [2:0] done;
  int   checks [3], failures [3];

  // Cora: 2708 nodes, 1433 features at 1.3 %, 10556 edges (3.9 per node), largest degree 168
  tb_gat_harness #(.NODES(2708), .IN_DIM(1433), .DENS_PM(13), .AVG_DEG(4),
                   .HUB_DEG(168), .NHUBS(2), .VALID_PCT(90), .CLASSES(7), .NAME("Cora")) u_cora (
    .done(done[0]), .n_checks(checks[0]), .n_failures(failures[0]));

  // CiteSeer: 3327 nodes, 3703 features at 0.8 %, 9104 edges (2.7 per node), largest degree 99
  tb_gat_harness #(.NODES(3327), .IN_DIM(3703), .DENS_PM(8), .AVG_DEG(3),
                   .HUB_DEG(99), .NHUBS(2), .VALID_PCT(90), .CLASSES(6), .NAME("CiteSeer")) u_citeseer (
    .done(done[1]), .n_checks(checks[1]), .n_failures(failures[1]));

  // PubMed: 19717 nodes, 500 features at 10.4 %, 88648 edges (4.5 per node), largest degree 171
  tb_gat_harness #(.NODES(19717), .IN_DIM(500), .DENS_PM(104), .AVG_DEG(5),
                   .HUB_DEG(171), .NHUBS(2), .VALID_PCT(90), .CLASSES(3), .NAME("PubMed")) u_pubmed (
    .done(done[2]), .n_checks(checks[2]), .n_failures(failures[2]));

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2], failures[0] + failures[1] + failures[2]);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge u_cora.clk);
    $display("watchdog: %0d / %0d / %0d outputs", u_cora.nout, u_citeseer.nout, u_pubmed.nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2], failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end
endmodule
