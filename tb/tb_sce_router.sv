// tb_sce_router: every destination address for several node addresses and
// random link role assignments, against the routing rules written out here.
module tb_sce_router;
  import smile_pkg::*;
  sce_cfg_t cfg;
  node_addr_t dest;
  port_t port, exp_port;
  int checks = 0, failures = 0;
  int n_local = 0, n_prev = 0, n_next = 0, n_dn = 0, n_up = 0;

  sce_router dut (.*);

  initial begin
    for (int n = 0; n < 200; n++) begin
      cfg.node_addr   = node_addr_t'((n < 32) ? n : $urandom);
      cfg.port_prev   = port_t'($urandom_range(0, 2));
      cfg.port_next   = port_t'($urandom_range(0, 2));
      cfg.port_sbe_dn = port_t'($urandom_range(0, 2));
      cfg.port_sbe_up = port_t'($urandom_range(0, 2));
      for (int d = 0; d < 32; d++) begin
        dest = node_addr_t'(d);
        #1;
        if (d == int'(cfg.node_addr)) begin exp_port = PORT_LOCAL; n_local++; end
        else if (d / 4 == int'(cfg.node_addr) / 4) begin
          if (d < int'(cfg.node_addr)) begin exp_port = cfg.port_prev; n_prev++; end
          else begin exp_port = cfg.port_next; n_next++; end
        end else if (d / 4 < int'(cfg.node_addr) / 4) begin exp_port = cfg.port_sbe_dn; n_dn++; end
        else begin exp_port = cfg.port_sbe_up; n_up++; end
        checks++;
        if (port !== exp_port) begin
          failures++;
          $display("FAIL node %0d dest %0d: port %0d expected %0d", cfg.node_addr, d, port, exp_port);
        end
      end
    end
    checks++;
    if (n_local == 0 || n_prev == 0 || n_next == 0 || n_dn == 0 || n_up == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
