// tb_serial_core: self-checking test of serial_core (8 slots, priority
// criterion).
//
// The same random method mix as the register-based core's test is applied
// through the valid/ready handshake, one request at a time. Answers are
// compared with the reference model in sched_ref_pkg. The time from the
// accepting clock edge to the answer is measured for every request. Methods
// that need no walk (chosen, create, size, and every failing method except
// get_id) must answer one cycle after acceptance. No method may take more
// than 2N+1 cycles, and the times must vary, which they do in this
// organisation. Every method must have both succeeded and failed.
module tb_serial_core;
  import sched_pkg::*;
  import sched_ref_pkg::*;
  localparam int unsigned N   = 8;
  localparam int unsigned IDW = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic req_valid = 1'b0;
  logic req_ready, rsp_valid;
  method_id_e req_m = M_CHOSEN;
  logic [IDW-1:0] req_id = '0;
  int_t req_value = '0, req_prio = '0;
  maybe_int_t rsp;

  int checks = 0, failures = 0;
  int lat_min = 1000, lat_max = 0;
  sched_ref ref_m;

  serial_core #(.N(N), .CRIT(CRIT_PRIORITY), .IDW(IDW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e_ok, walks;
    int e_ret, k, lat, before_size;
    ref_m = new(N);
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int step = 0; step < 6000; step++) begin
      k = $urandom_range(0, 99);
      if (k < 16)      req_m = M_CREATE;
      else if (k < 22) req_m = M_DESTROY;
      else if (k < 26) req_m = M_GET_ID;
      else if (k < 29) req_m = M_SIZE;
      else if (k < 32) req_m = M_CHOSEN;
      else if (k < 52) req_m = M_INSERT;
      else if (k < 60) req_m = M_REMOVE;
      else if (k < 66) req_m = M_REMOVE_HEAD;
      else if (k < 80) req_m = M_CHOOSE;
      else if (k < 88) req_m = M_CHOOSE_ANOTHER;
      else             req_m = M_CHOOSE_ELEM;
      req_id    = IDW'($urandom_range(0, N - 1));
      req_value = int_t'($urandom_range(1000, 1011));
      req_prio  = int_t'($urandom_range(0, 4) - 2);
      req_valid = 1'b1;
      // Wait for the edge that takes the request.
      do @(posedge clk); while (!req_ready);
      before_size = ref_m.size();
      ref_m.call(req_m, req_id, req_value, req_prio, e_ok, e_ret);
      #1;
      req_valid = 1'b0;
      lat = 0;
      do begin
        @(posedge clk);
        lat++;
      end while (!rsp_valid && lat < 100);
      check(rsp_valid, "answered");
      check(rsp.exists == e_ok, $sformatf("exists of method %0d", req_m));
      if (e_ok) check(rsp.thing == int_t'(e_ret), $sformatf("value of method %0d", req_m));
      walks = e_ok && (req_m inside {M_INSERT, M_REMOVE, M_DESTROY, M_REMOVE_HEAD,
                                     M_CHOOSE, M_CHOOSE_ANOTHER, M_CHOOSE_ELEM});
      if (!walks && req_m != M_GET_ID) check(lat == 1, "one cycle without a walk");
      check(lat <= 2 * N + 1, "bounded time");
      if (lat < lat_min) lat_min = lat;
      if (lat > lat_max) lat_max = lat;
      #1;
    end
    for (int m = 0; m <= 10; m++) begin
      if (m != int'(M_SIZE) && m != int'(M_CREATE))
        check(ref_m.n_fail[m] > 0, $sformatf("method %0d failed at least once", m));
      check(ref_m.n_ok[m] > 0, $sformatf("method %0d succeeded at least once", m));
    end
    check(ref_m.n_pool_full > 0, "pool full seen");
    check(ref_m.n_destroy_queued > 0, "queued element destroyed");
    check(ref_m.n_switch > 0 && ref_m.n_keep > 0, "choose switched and kept");
    check(lat_max > lat_min, "time depends on the method and the queue");
    $display("answer time %0d to %0d cycles after acceptance", lat_min, lat_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
