// bw_pkg: types and constants shared by the backtracking wave-pipeline (BW)
// switch.
//
// The switch has five bidirectional ports. Their numbering (0 = IP,
// 1 = North, 2 = East, 3 = South, 4 = West) and the switch-to-switch
// handshake codes (a 1-bit request, a 2-bit answer) follow the published
// design. A link carries DATA_W data bits plus the forwarded source clock in
// bit 0. Torus size, address layout of the probe header and the
// profitable-direction function below are this implementation's choices:
// North is taken as +y and East as +x, and a move is profitable when it
// shortens the wrap-around distance to the destination (both directions of a
// dimension are profitable when the destination is exactly half-way round).
package bw_pkg;

  localparam int unsigned NPORTS = 5;

  typedef enum logic [2:0] {
    PORT_IP    = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  // Answer signal codes, one per state of the handshake.
  typedef enum logic [1:0] {
    ANS_IDLE    = 2'b00,  // idle, or probe still advancing
    ANS_ACK     = 2'b01,  // circuit acknowledged: receiver ready for data
    ANS_BLOCKED = 2'b10,  // network blocked: the probe must backtrack
    ANS_BUSY    = 2'b11   // busy destination
  } ans_e;

  typedef logic [NPORTS-1:0] port_mask_t;

  // Set of profitable output ports for a probe at (my_x, my_y) heading to
  // (dst_x, dst_y) on an nx-by-ny torus. Arrival at the destination routes
  // to the local IP port only.
  function automatic port_mask_t profitable_ports(
      input int unsigned nx, input int unsigned ny,
      input int unsigned my_x, input int unsigned my_y,
      input int unsigned dst_x, input int unsigned dst_y);
    port_mask_t m;
    int unsigned dx, dy;
    m  = '0;
    dx = (dst_x + nx - my_x) % nx;   // hops needed going East
    dy = (dst_y + ny - my_y) % ny;   // hops needed going North
    if (dx == 0 && dy == 0) begin
      m[PORT_IP] = 1'b1;
    end else begin
      if (dx != 0 && 2 * dx <= nx) m[PORT_EAST]  = 1'b1;
      if (dx != 0 && 2 * dx >= nx) m[PORT_WEST]  = 1'b1;
      if (dy != 0 && 2 * dy <= ny) m[PORT_NORTH] = 1'b1;
      if (dy != 0 && 2 * dy >= ny) m[PORT_SOUTH] = 1'b1;
    end
    return m;
  endfunction

endpackage
