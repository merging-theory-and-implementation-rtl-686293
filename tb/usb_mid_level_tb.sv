// usb_mid_level_tb: self-checking test of the PDIUSB12 command sequencer.
//
// Stands in for usb_low_level: accepts each byte transfer after a random
// wait, records it, and answers reads with consecutive bytes from a counter.
// Every operation is issued with random endpoint and data, and the recorded
// transfers (command/data, read/write, byte) are compared with the sequence
// the PDIUSB12 command set prescribes, written out independently below. The
// result word is compared with the bytes the stand-in returned.
module usb_mid_level_tb;
  import usb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic op_valid = 0, op_ready, op_done;
  usb_op_e op = OP_READ_INT;
  logic [2:0] op_ep = 0;
  logic [15:0] op_wdata = 0, op_rdata;
  logic ll_valid, ll_ready = 0, ll_done = 0;
  bus_xfer_t ll_req;
  logic [7:0] ll_rdata = 0;
  int checks = 0, failures = 0;

  usb_mid_level dut (.*);

  // ---- low-level stand-in ----
  bus_xfer_t log_q [$];
  logic [7:0] next_byte = 8'h10;
  initial begin
    forever begin
      @(negedge clk);
      ll_done = 0;
      if (!ll_valid) begin ll_ready = 1; continue; end
      ll_ready = 1;
      @(posedge clk); #1;
      log_q.push_back(ll_req);
      ll_ready = 0;
      repeat ($urandom_range(1, 4)) @(negedge clk);
      if (ll_req.read) begin ll_rdata = next_byte; next_byte++; end
      ll_done = 1;
    end
  end

  function automatic bus_xfer_t C(input logic [7:0] b); return '{1'b1, 1'b0, b}; endfunction
  function automatic bus_xfer_t W(input logic [7:0] b); return '{1'b0, 1'b0, b}; endfunction
  function automatic bus_xfer_t R();                    return '{1'b0, 1'b1, 8'h00}; endfunction

  task automatic run(input usb_op_e o, input logic [2:0] ep, input logic [15:0] wd,
                     input bus_xfer_t exp [$], input logic check_r, input logic [15:0] exp_r);
    log_q.delete();
    @(negedge clk);
    while (!op_ready) @(negedge clk);
    op = o; op_ep = ep; op_wdata = wd; op_valid = 1;
    @(negedge clk);
    op_valid = 0;
    while (!op_done) @(negedge clk);
    checks++;
    if (log_q.size() != exp.size()) begin
      failures++; $display("FAIL %s: %0d transfers, expected %0d", o.name(), log_q.size(), exp.size());
    end else begin
      foreach (exp[i]) if (log_q[i].cmd !== exp[i].cmd || log_q[i].read !== exp[i].read ||
                           (!exp[i].read && log_q[i].data !== exp[i].data)) begin
        failures++; $display("FAIL %s: transfer %0d = %h, expected %h", o.name(), i, log_q[i], exp[i]);
      end
    end
    if (check_r) begin
      checks++;
      if (op_rdata !== exp_r) begin failures++; $display("FAIL %s: rdata %h expected %h", o.name(), op_rdata, exp_r); end
    end
  endtask

  initial begin
    logic [2:0] e; logic [15:0] d; logic [7:0] b0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int rep = 0; rep < 8; rep++) begin
      e = 3'($urandom_range(0, 5)); d = 16'($urandom);
      run(OP_SET_MODE, e, d, '{C(8'hF3), W(d[7:0]), W(d[15:8])}, 0, 0);
      run(OP_SET_ADDR, e, d, '{C(8'hD0), W(d[7:0])}, 0, 0);
      run(OP_SET_EP_EN, e, d, '{C(8'hD8), W({7'd0, d[0]})}, 0, 0);
      b0 = next_byte;
      run(OP_READ_INT, e, d, '{C(8'hF4), R(), R()}, 1, {b0 + 8'd1, b0});
      b0 = next_byte;
      run(OP_READ_STATUS, e, d, '{C(8'h40 + 8'(e)), R()}, 1, {8'h00, b0});
      run(OP_SET_STALL, e, d, '{C(8'h40 + 8'(e)), W({7'd0, d[0]})}, 0, 0);
      run(OP_ACK_SETUP, e, d, '{C(8'h00), C(8'hF1), C(8'h01), C(8'hF1)}, 0, 0);
      b0 = next_byte;
      run(OP_RD_START, e, d, '{C(8'(e)), C(8'hF0), R(), R()}, 1, {8'h00, b0 + 8'd1});
      b0 = next_byte;
      run(OP_RD_WORD, e, d, '{R(), R()}, 1, {b0 + 8'd1, b0});
      b0 = next_byte;
      run(OP_RD_BYTE, e, d, '{R()}, 1, {8'h00, b0});
      run(OP_RD_END, e, d, '{C(8'(e)), C(8'hF2)}, 0, 0);
      run(OP_WR_START, e, d, '{C(8'(e)), C(8'hF0), W(8'h00), W(d[7:0])}, 0, 0);
      run(OP_WR_WORD, e, d, '{W(d[7:0]), W(d[15:8])}, 0, 0);
      run(OP_WR_BYTE, e, d, '{W(d[7:0])}, 0, 0);
      run(OP_WR_END, e, d, '{C(8'(e)), C(8'hFA)}, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
