// tb_input_port: one input channel at tile (1,1), with XY and with
// odd-even output selection.
//
// Checks that the CL received from upstream is held one cycle later (CF),
// that a head flit requests the XY port, that lost competitions raise AGE
// and a win clears it and locks the channel to its output, that flits then
// leave in order and the tail unlocks the channel, that the five-flit
// buffer refuses a sixth flit, and that the odd-even channel takes the
// direction the availability mask allows.
module tb_input_port;
  import cagis_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t in_flit, front, front_oe;
  logic in_valid, in_ready, win, lose, pop, front_valid;
  logic [CL_W-1:0] in_cl, cl;
  logic [AGE_W-1:0] age;
  logic [NPORTS-1:0] avail, req_new, req_all;
  // odd-even instance
  flit_t in_flit_oe;
  logic in_valid_oe, in_ready_oe, fv_oe;
  logic [CL_W-1:0] cl_oe;
  logic [AGE_W-1:0] age_oe;
  logic [NPORTS-1:0] rn_oe, ra_oe;
  int checks = 0, failures = 0;

  input_port dut (
    .clk, .rst_n, .cur_x(4'd1), .cur_y(4'd1), .in_flit, .in_valid, .in_ready, .in_cl,
    .avail, .req_new, .req_all, .cl, .age, .win, .lose, .front, .front_valid, .pop
  );
  input_port #(.ROUTING(ROUTE_OE)) dut_oe (
    .clk, .rst_n, .cur_x(4'd1), .cur_y(4'd1), .in_flit(in_flit_oe), .in_valid(in_valid_oe),
    .in_ready(in_ready_oe), .in_cl(3'd0), .avail, .req_new(rn_oe), .req_all(ra_oe),
    .cl(cl_oe), .age(age_oe), .win(1'b0), .lose(1'b0), .front(front_oe), .front_valid(fv_oe),
    .pop(1'b0)
  );

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t mk(int idx, int dx, int dy);
    head_t h;
    h = '{src_x: 4'd0, src_y: 4'd1, dst_x: 4'(dx), dst_y: 4'(dy), tag: 16'hBEEF};
    if (idx == 0) return '{kind: FLIT_HEAD, data: h};
    return '{kind: (idx == 4) ? FLIT_TAIL : FLIT_BODY, data: 32'(idx * 17)};
  endfunction

  task automatic push(flit_t f);
    in_flit = f; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_flit = '0; in_cl = 0; win = 0; lose = 0; pop = 0; avail = '0;
    in_valid_oe = 0; in_flit_oe = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    in_cl = 3'd3;
    @(negedge clk);
    chk(cl == 3'd3, "CF holds upstream CL");
    chk(!front_valid && req_new == '0, "empty");
    // packet to (3,1): east
    for (int i = 0; i < 5; i++) push(mk(i, 3, 1));
    chk(!in_ready, "buffer full after five flits");
    chk(req_new == 5'b00010 && req_all == 5'b00010, "XY request east");
    lose = 1; @(negedge clk); @(negedge clk); lose = 0;
    chk(age == 4'd2, "two losses");
    win = 1; @(negedge clk); win = 0;
    chk(age == 4'd0, "win clears AGE");
    chk(req_new == '0 && req_all == 5'b00010, "locked to east");
    for (int i = 0; i < 5; i++) begin
      chk(front_valid && front == mk(i, 3, 1), "flit order");
      pop = 1; @(negedge clk); pop = 0;
    end
    chk(!front_valid && req_all == '0, "drained");
    // next packet to (1,3): north, request appears only for a head
    push(mk(0, 1, 3));
    chk(req_new == 5'b01000, "XY request north");
    // odd-even: from (1,1) to (3,3) both east and north are legal
    in_flit_oe = mk(0, 3, 3);
    in_valid_oe = 1; @(negedge clk); in_valid_oe = 0;
    avail = 5'b01000; #1;
    chk(rn_oe == 5'b01000, "OE takes free north");
    avail = 5'b00010; #1;
    chk(rn_oe == 5'b00010, "OE takes free east");
    avail = 5'b00000; #1;
    chk(rn_oe == 5'b00010, "OE defaults to X");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
