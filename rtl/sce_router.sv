// sce_router: routing decision of the SMILE Communication Element.
//
// Nodes are grouped in fours (an SBE, SMILE Block Element); node address bits
// above the low two give the SBE number. For a packet header's destination:
//   - this node's address            -> deliver locally (PORT_LOCAL)
//   - same SBE, lower address        -> link to the previous neighbour
//   - same SBE, higher address       -> link to the next neighbour
//   - another SBE                    -> the link leading towards that SBE
//                                       (separate settings for lower- and
//                                       higher-numbered SBEs)
// The four rules for local delivery and for the SBE neighbours follow the
// SMILE design. Which physical link plays which role is written at start-up
// (cfg), as the SMILE design leaves that to the driver; the split into a "down"
// and an "up" SBE direction is this design's choice, so a chain of SBEs can be
// routed. Purely combinational.
module sce_router
  import smile_pkg::*;
(
  input  sce_cfg_t   cfg,
  input  node_addr_t dest,
  output port_t      port
);

  logic [NODE_W-SBE_LSB-1:0] my_sbe, dest_sbe;

  always_comb begin
    my_sbe   = cfg.node_addr[NODE_W-1:SBE_LSB];
    dest_sbe = dest[NODE_W-1:SBE_LSB];
    if (dest == cfg.node_addr)      port = PORT_LOCAL;
    else if (dest_sbe == my_sbe)    port = (dest < cfg.node_addr) ? cfg.port_prev : cfg.port_next;
    else if (dest_sbe < my_sbe)     port = cfg.port_sbe_dn;
    else                            port = cfg.port_sbe_up;
  end

endmodule
