// tb_switch_ctrl: self-checking test of the controller FSM. Directed
// scenarios check the state sequence idle -> receive_cell -> process_cell ->
// switch_cell -> transmit_cell -> idle (five clocks per cell), the one-hot
// receive command, the MUX select, write / drop_full / drop_header in
// switch_cell, reads in transmit_cell, round-robin order over inputs and
// outputs, and the direct idle -> transmit_cell path.
module tb_switch_ctrl;
  import atm_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] cell_arrived = '0;
  logic conv_valid;
  cnv_status_e conv_status = CNV_OK;
  logic [7:0] conv_port = '0;
  logic buffer_full = 0;
  logic [N-1:0] q_nonempty = '0, tx_ready = '1;
  logic [N-1:0] cnv_load;
  logic [2:0] mux_sel, wr_port, rd_port;
  logic mux_load, write, read, drop_full, drop_header;
  ctrl_state_e state;
  int checks = 0, failures = 0;

  switch_ctrl #(.N_PORTS(N)) dut (.*);

  always #5 clk = ~clk;

  // the MUX register's valid flag, as the datapath would produce it
  always_ff @(posedge clk) conv_valid <= mux_load;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %s)", what, state.name()); end
  endtask

  // Serve one waiting cell starting in idle; returns the served input.
  // The cell is routed to `port` with status `st`; `exp` is what switch_cell
  // must do: 0 write, 1 drop_full, 2 drop_header.
  // Called at a negedge, in idle (first = 1) or in transmit_cell.
  task automatic serve(input int exp_in, input cnv_status_e st, input int port, input int exp,
                       input bit first = 0);
    if (!first) @(negedge clk);
    check(state == ST_IDLE, "starts in idle");
    @(negedge clk);
    check(state == ST_RECEIVE_CELL, "receive_cell after cell_arrived");
    check(cnv_load == (N'(1) << exp_in), $sformatf("receive input %0d", exp_in));
    @(negedge clk);
    cell_arrived[exp_in] = 0;       // S/P released at the edge ending receive_cell
    check(state == ST_PROCESS_CELL && mux_load && mux_sel == 3'(exp_in), "process_cell loads MUX");
    check(cnv_load == '0, "no receive command in process_cell");
    conv_status = st; conv_port = 8'(port);
    @(negedge clk);
    check(state == ST_SWITCH_CELL, "switch_cell");
    check(write == (exp == 0) && drop_full == (exp == 1) && drop_header == (exp == 2), "switch_cell action");
    if (exp == 0) check(wr_port == 3'(port), "write to routed port");
    @(negedge clk);
    check(state == ST_TRANSMIT_CELL, "transmit_cell");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(state == ST_IDLE && !read && !write, "idle with nothing to do");
    // two inputs waiting: served round robin from input 0 upward
    cell_arrived = 8'b0010_0100;
    serve(2, CNV_OK, 6, 0, 1);
    check(!read, "no read when queues empty");
    serve(5, CNV_OK, 1, 0);
    // buffer full: cell lost
    cell_arrived = 8'b0000_0001; buffer_full = 1;
    serve(0, CNV_OK, 3, 1);
    buffer_full = 0;
    // bad header: dropped even though buffer has room
    cell_arrived = 8'b1000_0000;
    serve(7, CNV_NO_ROUTE, 0, 2);
    // round robin continues after input 7 with input 0 next, not 4
    cell_arrived = 8'b0001_0001;
    serve(0, CNV_HEC_ERR, 0, 2);
    serve(4, CNV_OK, 2, 0);
    // transmit in the transmit_cell that follows a switch_cell
    q_nonempty = 8'b0000_0100; tx_ready = 8'b0000_0100;
    #1 check(read && rd_port == 3'd2, "read in transmit_cell after switch_cell");
    @(negedge clk);
    q_nonempty = '0;
    check(state == ST_IDLE, "back to idle");
    // idle straight to transmit_cell; outputs served round robin, only ready ones
    q_nonempty = 8'b1010_0010; tx_ready = 8'b1000_0010;
    @(negedge clk);
    check(state == ST_TRANSMIT_CELL && read && rd_port == 3'd7, "direct transmit, output 7 after 2");
    @(negedge clk);
    check(state == ST_IDLE, "idle after transmit");
    @(negedge clk);
    check(state == ST_TRANSMIT_CELL && read && rd_port == 3'd1, "direct transmit, output 1 next");
    tx_ready = '0;
    @(negedge clk);
    @(negedge clk);
    check(state == ST_IDLE && !read, "no transmit when no output ready");
    // arrivals take priority over transmission in idle
    tx_ready = '1; cell_arrived = 8'b0000_1000;
    @(negedge clk);
    check(state == ST_RECEIVE_CELL, "arrival preferred to transmit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
