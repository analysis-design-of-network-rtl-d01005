// tb_onoc_node: self-checking test of the router data part and its routing.
//
// Three nodes at position (1,1) of a 4x4 mesh, built with X-first, Y-first
// and XY-random routing, are loaded with the same flits for every destination
// of the mesh, each arriving on a different input. For every flit the test
// computes the expected port itself: X-first goes east/west until the column
// matches, Y-first north/south until the row matches, XY-random may take
// either of the two productive directions, and a flit for (1,1) goes to the
// local port. At xfer the flit must appear, unchanged, only on that output.
// The XY-random node must use both orders at least once over the run.
module tb_onoc_node;
  import onoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NX = 1, NY = 1;
  flit_t din [NPORTS];
  logic  load = 1'b0, xfer = 1'b0;
  port_e oport [3];
  flit_t dout  [3][NPORTS];

  onoc_node #(.X(NX), .Y(NY), .ROUTING(RT_XY)) u_xy (
    .clk, .rst_n, .data_in(din), .load, .xfer, .output_port(oport[0]), .data_out(dout[0]));
  onoc_node #(.X(NX), .Y(NY), .ROUTING(RT_YX)) u_yx (
    .clk, .rst_n, .data_in(din), .load, .xfer, .output_port(oport[1]), .data_out(dout[1]));
  onoc_node #(.X(NX), .Y(NY), .ROUTING(RT_XY_RANDOM)) u_rnd (
    .clk, .rst_n, .data_in(din), .load, .xfer, .output_port(oport[2]), .data_out(dout[2]));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic port_e xdir(int dx);
    return (dx > NX) ? PORT_EAST : PORT_WEST;
  endfunction
  function automatic port_e ydir(int dy);
    return (dy > NY) ? PORT_SOUTH : PORT_NORTH;
  endfunction

  int rnd_x_first = 0, rnd_y_first = 0;

  initial begin
    for (int p = 0; p < NPORTS; p++) din[p] = NO_FLIT;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int d = 0; d < 16; d++) begin
        int dx = d % 4, dy = d / 4, inp = (d + rep) % NPORTS;
        flit_t f;
        port_e exp_xy, exp_yx;
        f = NO_FLIT;
        f.prio = prio_e'(1 + (d % 3));
        f.ts = ts_t'(d * 77 + rep);
        f.src_x = coord_t'(rep);
        f.dst_x = coord_t'(dx);
        f.dst_y = coord_t'(dy);
        f.payload = PAYLOAD_W'(64'hABCD_0000 + d + 16 * rep);
        if (dx == NX && dy == NY) begin exp_xy = PORT_LOCAL; exp_yx = PORT_LOCAL; end
        else if (dx == NX) begin exp_xy = ydir(dy); exp_yx = ydir(dy); end
        else if (dy == NY) begin exp_xy = xdir(dx); exp_yx = xdir(dx); end
        else begin exp_xy = xdir(dx); exp_yx = ydir(dy); end
        // load cycle: only the granted input drives a flit
        din[inp] = f;
        load = 1'b1;
        @(negedge clk);
        din[inp] = NO_FLIT;
        load = 1'b0;
        check(oport[0] == exp_xy, $sformatf("XY dst (%0d,%0d) port %0d expected %0d", dx, dy, oport[0], exp_xy));
        check(oport[1] == exp_yx, $sformatf("YX dst (%0d,%0d) port %0d expected %0d", dx, dy, oport[1], exp_yx));
        check(oport[2] == exp_xy || oport[2] == exp_yx, $sformatf("XY-random dst (%0d,%0d) port %0d", dx, dy, oport[2]));
        if (exp_xy != exp_yx) begin
          if (oport[2] == exp_xy) rnd_x_first++;
          else rnd_y_first++;
        end
        for (int n = 0; n < 3; n++)
          for (int p = 0; p < NPORTS; p++) check(dout[n][p] == NO_FLIT, "no flit on outputs before xfer");
        @(negedge clk);
        xfer = 1'b1;
        #1;
        for (int n = 0; n < 3; n++)
          for (int p = 0; p < NPORTS; p++)
            check(dout[n][p] == ((p == int'(oport[n])) ? f : NO_FLIT),
                  $sformatf("node %0d output %0d at xfer", n, p));
        @(negedge clk);
        xfer = 1'b0;
      end
    end
    check(rnd_x_first > 0 && rnd_y_first > 0,
          $sformatf("XY-random used both orders (%0d x-first, %0d y-first)", rnd_x_first, rnd_y_first));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
