// rbc_router: the two-stage mesh router of one tile, with a router buffer
// cache (RBC) beside its control logic.
//
// Five ports (local, east, west, north, south), each with NUM_VC virtual
// channels of BUF_DEPTH flits, wormhole switching with credit flow control.
//   Stage 1  a head flit at the front of its VC buffer gets its output port
//            from the X-Y routing unit. If the packet has reached its home
//            tile and is a read, write or upgrade request, the RBC is looked
//            up in the same stage (one lookup per cycle, round robin among
//            the VCs that need one):
//              read hit  -> the RBC queues a 9-flit reply for the requester
//                           and the request is marked "serviced" before it
//                           continues to the LLC, which then only records the
//                           new sharer;
//              write or upgrade hit -> the RBC block is invalidated before
//                           the request continues to the LLC.
//   Stage 2  speculative VC allocation and switch allocation run side by
//            side. A body flit, or a head that already holds an output VC,
//            requests the switch when the output VC has a credit. A head that
//            still waits for a VC requests the switch speculatively; its grant
//            is used only if the VC allocator gave it a VC with a credit in
//            the same cycle, otherwise the slot is lost (a "speculation
//            failure"). Winners cross the 5x5 crossbar into the output
//            registers.
// A flit written into an input buffer at one clock edge leaves the output
// register two edges later when nothing blocks it; with the link register of
// the next router this is 3 cycles per hop.
//
// RBC replies enter the local input port through a multiplexer in front of
// it, on VC RBC_VC, whenever the processing element is not injecting in that
// cycle and that VC has room; the processing element must therefore not use
// VC RBC_VC, and no credits are returned to it for that VC.
//
// From the source: two stages, RC with RBC lookup first and speculative VA
// with SA second, 5 ports, 3 VCs, the 5x5 crossbar, X-Y routing, the RBC and
// its place in front of the local input port, the serviced marking and the
// invalidate-before-forward order. Own choices: the VC reserved for replies,
// the buffer depth, the allocator structures and the sideband ports between
// the RBC and the LLC controller.
module rbc_router
  import rbc_pkg::*;
#(
  parameter int unsigned MY_X        = 0,
  parameter int unsigned MY_Y        = 0,
  parameter int unsigned RBC_ENTRIES = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // network ports, indexed by port_e
  input  link_t   [NUM_PORTS-1:0]     in_link,
  output credit_t [NUM_PORTS-1:0]     out_credit,   // credits for in_link
  output link_t   [NUM_PORTS-1:0]     out_link,
  input  credit_t [NUM_PORTS-1:0]     in_credit,    // credits for out_link
  // RBC side port to the LLC controller
  input  logic                        inv_valid,
  input  blk_t                        inv_blk,
  output logic                        inv_ready,
  input  logic                        fill_valid,
  input  blk_t                        fill_blk,
  input  blk_data_t                   fill_data,
  output logic                        fill_ready,
  output logic                        ev_valid,
  output blk_t                        ev_blk,
  output logic [HIT_CTR_W-1:0]        ev_hits,
  // event pulses
  output logic                        ev_read_hit,
  output logic                        ev_write_inv,
  output logic                        ev_llc_inv,
  output logic                        ev_fill,
  output logic                        ev_evict,
  output logic                        ev_reply_stall,
  output logic                        ev_spec_fail,
  output logic                        ev_credit_stall
);
  localparam int unsigned NP = NUM_PORTS;
  localparam int unsigned NV = NUM_VC;
  localparam int unsigned NI = NP * NV;
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);
  localparam logic [COORD_W-1:0] X = COORD_W'(MY_X);
  localparam logic [COORD_W-1:0] Y = COORD_W'(MY_Y);

  // ------------------------------------------------------------ input ports
  link_t                  local_in;
  flit_t [NP-1:0][NV-1:0] front;
  logic  [NP-1:0][NV-1:0] empty, full, pop;

  logic  rp_valid, rp_ready;
  flit_t rp_flit;

  // The multiplexer in front of the local input port: the processing element
  // first, RBC replies in the cycles it leaves free.
  assign rp_ready = !in_link[P_LOCAL].valid && !full[P_LOCAL][RBC_VC];
  always_comb begin
    local_in = in_link[P_LOCAL];
    if (rp_valid && rp_ready) begin
      local_in.valid = 1'b1;
      local_in.flit  = rp_flit;
    end
  end

  for (genvar p = 0; p < NP; p++) begin : g_in
    input_port u_port (
      .clk, .rst_n,
      .in    ((p == 0) ? local_in : in_link[p]),
      .pop   (pop[p]),
      .front (front[p]),
      .empty (empty[p]),
      .full  (full[p])
    );
  end

  // ------------------------------------------------------------ VC state
  logic  [NP-1:0][NV-1:0]             rt_valid, ov_valid, svc;
  logic  [NP-1:0][NV-1:0][PORT_W-1:0] rt_port;
  logic  [NP-1:0][NV-1:0][VC_W-1:0]   ov_vc;
  logic  [NP-1:0][NV-1:0]             ob_busy;      // [out port][out VC]
  logic  [NP-1:0][NV-1:0][CW-1:0]     credit;       // [out port][out VC]

  // ------------------------------------------------------------ stage 1
  head_t [NP-1:0][NV-1:0]             fh;
  port_e [NP-1:0][NV-1:0]             rc_port;
  logic  [NP-1:0][NV-1:0]             rc_home;
  logic  [NI-1:0]                     need_rc, need_lk, lk_grant;

  for (genvar p = 0; p < NP; p++) begin : g_rc_p
    for (genvar v = 0; v < NV; v++) begin : g_rc_v
      assign fh[p][v] = head_t'(front[p][v].data);
      xy_route u_rc (
        .cur_x (X), .cur_y (Y),
        .dst_x (fh[p][v].dst_x), .dst_y (fh[p][v].dst_y),
        .out_port (rc_port[p][v]),
        .at_home  (rc_home[p][v])
      );
      assign need_rc[p*NV+v] = !empty[p][v] && is_head(front[p][v].ftype) &&
                               !rt_valid[p][v];
      assign need_lk[p*NV+v] = need_rc[p*NV+v] && rc_home[p][v] &&
                               is_request(fh[p][v].msg);
    end
  end

  logic lk_hit, lk_accept, lk_valid;
  head_t lk_head;
  logic [PORT_W-1:0] lk_p;
  logic [VC_W-1:0]   lk_v;

  rr_arbiter #(.N(NI)) u_lk_arb (
    .clk, .rst_n, .req(need_lk), .advance(lk_accept), .grant(lk_grant)
  );

  always_comb begin
    lk_valid = |lk_grant;
    lk_p     = '0;
    lk_v     = '0;
    for (int i = 0; i < NI; i++)
      if (lk_grant[i]) begin
        lk_p = PORT_W'(i / NV);
        lk_v = VC_W'(i % NV);
      end
    lk_head = fh[lk_p][lk_v];
  end

  rbc #(.ENTRIES(RBC_ENTRIES)) u_rbc (
    .clk, .rst_n,
    .my_x (X), .my_y (Y),
    .lk_valid, .lk_msg (lk_head.msg), .lk_blk (lk_head.blk),
    .lk_src_x (lk_head.src_x), .lk_src_y (lk_head.src_y),
    .lk_hit, .lk_accept,
    .inv_valid, .inv_blk, .inv_ready,
    .fill_valid, .fill_blk, .fill_data, .fill_ready,
    .ev_valid, .ev_blk, .ev_hits,
    .rp_valid, .rp_flit, .rp_ready,
    .ev_read_hit, .ev_write_inv, .ev_llc_inv, .ev_fill, .ev_reply_stall
  );
  assign ev_evict = ev_valid;

  logic [NP-1:0][NV-1:0] rc_done, rc_svc;
  always_comb begin
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NV; v++) begin
        rc_done[p][v] = need_rc[p*NV+v] &&
                        (!need_lk[p*NV+v] || (lk_grant[p*NV+v] && lk_accept));
        rc_svc[p][v]  = lk_grant[p*NV+v] && lk_accept && lk_hit &&
                        (lk_head.msg == M_READ);
      end
  end

  // ------------------------------------------------------------ stage 2
  logic [NI-1:0]                va_req, va_grant;
  logic [NI-1:0][PORT_W-1:0]    va_port;
  logic [NI-1:0][VC_W-1:0]      va_vc;
  logic [NP-1:0][NV-1:0]        sa_req, sa_grant;
  logic [NP-1:0][NV-1:0][PORT_W-1:0] sa_port;
  logic [NP-1:0]                sa_out_valid;
  logic [NP-1:0][PORT_W-1:0]    sa_out_sel;

  always_comb begin
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NV; v++) begin
        va_req[p*NV+v]  = rt_valid[p][v] && !ov_valid[p][v];
        va_port[p*NV+v] = rt_port[p][v];
        sa_port[p][v]   = rt_port[p][v];
        sa_req[p][v]    = rt_valid[p][v] && !empty[p][v] &&
                          (!ov_valid[p][v] ||
                           credit[rt_port[p][v]][ov_vc[p][v]] != '0);
      end
  end

  vc_allocator u_va (
    .clk, .rst_n,
    .req (va_req), .req_port (va_port), .busy (ob_busy),
    .grant (va_grant), .grant_vc (va_vc)
  );

  switch_allocator u_sa (
    .clk, .rst_n,
    .req (sa_req), .req_port (sa_port),
    .grant (sa_grant), .out_valid (sa_out_valid), .out_sel (sa_out_sel)
  );

  // Which granted VCs really traverse, and with which output VC.
  function automatic logic [FLIT_W-1:0] mark_serviced(logic [FLIT_W-1:0] d);
    head_t h;
    h = head_t'(d);
    h.serviced = 1'b1;
    return h;
  endfunction

  logic [NP-1:0][NV-1:0]           go;
  logic [NP-1:0][NV-1:0][VC_W-1:0] eff_vc;
  logic [NP-1:0]                   port_go;
  flit_t [NP-1:0]                  xin;
  logic [NP-1:0]                   xvalid;
  logic                            spec_fail, credit_stall;

  always_comb begin
    spec_fail    = 1'b0;
    credit_stall = 1'b0;
    port_go      = '0;
    xin          = '0;
    xvalid       = '0;
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NV; v++) begin
        eff_vc[p][v] = ov_valid[p][v] ? ov_vc[p][v] : va_vc[p*NV+v];
        go[p][v] = sa_grant[p][v] &&
                   (ov_valid[p][v] ||
                    (va_grant[p*NV+v] &&
                     credit[rt_port[p][v]][va_vc[p*NV+v]] != '0));
        if (sa_grant[p][v] && !go[p][v]) spec_fail = 1'b1;
        if (rt_valid[p][v] && ov_valid[p][v] && !empty[p][v] &&
            credit[rt_port[p][v]][ov_vc[p][v]] == '0) credit_stall = 1'b1;
        if (go[p][v]) begin
          port_go[p]   = 1'b1;
          xin[p]       = front[p][v];
          xin[p].vc    = eff_vc[p][v];
          if (is_head(front[p][v].ftype) && svc[p][v])
            xin[p].data = mark_serviced(front[p][v].data);
        end
      end
    for (int o = 0; o < NP; o++)
      xvalid[o] = sa_out_valid[o] && port_go[sa_out_sel[o]];
  end

  assign pop = go;
  assign ev_spec_fail    = spec_fail;
  assign ev_credit_stall = credit_stall;

  link_t [NP-1:0] xout;
  crossbar u_xbar (
    .in_flit (xin), .sel_valid (xvalid), .sel (sa_out_sel), .out (xout)
  );

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_link   <= '0;
      out_credit <= '0;
      rt_valid   <= '0;
      rt_port    <= '0;
      ov_valid   <= '0;
      ov_vc      <= '0;
      svc        <= '0;
      ob_busy    <= '0;
      for (int o = 0; o < NP; o++)
        for (int v = 0; v < NV; v++) credit[o][v] <= CW'(BUF_DEPTH);
    end else begin
      out_link <= xout;

      for (int p = 0; p < NP; p++) begin
        out_credit[p] <= '0;
        for (int v = 0; v < NV; v++)
          if (go[p][v] && !(p == int'(P_LOCAL) && v == int'(RBC_VC))) begin
            out_credit[p].valid <= 1'b1;
            out_credit[p].vc    <= VC_W'(v);
          end
      end

      for (int o = 0; o < NP; o++)
        for (int v = 0; v < NV; v++) begin
          logic inc, dec;
          inc = in_credit[o].valid && in_credit[o].vc == VC_W'(v);
          dec = 1'b0;
          for (int p = 0; p < NP; p++)
            for (int w = 0; w < NV; w++)
              if (go[p][w] && rt_port[p][w] == PORT_W'(o) &&
                  eff_vc[p][w] == VC_W'(v)) dec = 1'b1;
          credit[o][v] <= credit[o][v] + CW'(inc) - CW'(dec);
        end

      for (int p = 0; p < NP; p++)
        for (int v = 0; v < NV; v++) begin
          if (rc_done[p][v]) begin
            rt_valid[p][v] <= 1'b1;
            rt_port[p][v]  <= rc_port[p][v];
            svc[p][v]      <= rc_svc[p][v];
          end
          if (va_grant[p*NV+v]) begin
            ov_valid[p][v] <= 1'b1;
            ov_vc[p][v]    <= va_vc[p*NV+v];
            ob_busy[rt_port[p][v]][va_vc[p*NV+v]] <= 1'b1;
          end
        end
      // Tail departures release the VC state; done last so that a head-tail
      // flit allocated and sent in one cycle leaves nothing held.
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < NV; v++)
          if (go[p][v] && is_tail(front[p][v].ftype)) begin
            rt_valid[p][v] <= 1'b0;
            ov_valid[p][v] <= 1'b0;
            svc[p][v]      <= 1'b0;
            ob_busy[rt_port[p][v]][eff_vc[p][v]] <= 1'b0;
          end
    end
  end

  a_no_credit_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_credit[P_EAST].valid |-> credit[P_EAST][in_credit[P_EAST].vc] != CW'(BUF_DEPTH));
  a_pe_avoids_rbc_vc: assert property (@(posedge clk) disable iff (!rst_n)
    in_link[P_LOCAL].valid |-> in_link[P_LOCAL].flit.vc != VC_W'(RBC_VC));
endmodule
