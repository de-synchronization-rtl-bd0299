// Testbench for desync_pipeline at its full size (16 stages, 64 bits).
//
// Two copies run side by side: the default one with the most concurrent
// two-phase controllers, and one with semi-decoupled four-phase controllers.
// Each is fed a random data stream by a handshaking producer and drained by
// a handshaking consumer, both with random response times. The consumer's
// values must equal a synchronous reference of the same pipeline: first the
// reset value of the last slave latch, then each result in order.
// Afterwards the four-phase copy is reset and driven the way a synchronous
// environment would drive it: in_req is a free-running clock, data changes
// on the clock's falling edge, and the output is acknowledged after 10 ps. The
// clock period is set well above the pipeline's own cycle, so the results
// must again match, and the controllers' handshake assertions must stay
// silent. The throughput of the handshake runs is printed.
module tb_desync_pipeline;
  timeunit 1ns; timeprecision 1ps;

  localparam int NSTAGE = 16, W = 64, NTOK = 60;

  int checks = 0, failures = 0;
  logic rst;
  logic [1:0] tap;
  logic [W-1:0] in_data [2], out_data [2];
  logic in_req [2], in_ack [2], out_req [2], out_ack [2];
  logic [2*NSTAGE-1:0] en [2];
  bit clocked;   // copy 1 driven by a free-running clock

  desync_pipeline dut_mc (
    .rst(rst), .tap(tap), .in_data(in_data[0]), .in_req(in_req[0]), .in_ack(in_ack[0]),
    .out_data(out_data[0]), .out_req(out_req[0]), .out_ack(out_ack[0]), .en(en[0]));
  desync_pipeline #(.CONCURRENT(1'b0)) dut_sd (
    .rst(rst), .tap(tap), .in_data(in_data[1]), .in_req(in_req[1]), .in_ack(in_ack[1]),
    .out_data(out_data[1]), .out_req(out_req[1]), .out_ack(out_ack[1]), .en(en[1]));

  // Stimulus and synchronous reference.
  logic [W-1:0] stim [NTOK + 2*NSTAGE + 4];
  logic [W-1:0] expect_q [NTOK + 1];

  function automatic logic [W-1:0] f_stage(input int unsigned s, input logic [W-1:0] x);
    logic [63:0] k;
    k = 64'h9E37_79B9_7F4A_7C15 * 64'(s + 1);
    return {x[W-2:0], x[W-1]} ^ k[W-1:0];
  endfunction

  initial begin
    logic [W-1:0] l1 [NSTAGE], l2 [NSTAGE];
    for (int i = 0; i < NTOK + 2*NSTAGE + 4; i++) stim[i] = {$urandom, $urandom};
    for (int s = 0; s < NSTAGE; s++) l2[s] = '0;
    expect_q[0] = '0;
    for (int k = 0; k < NTOK; k++) begin
      l1[0] = f_stage(0, stim[k]);
      for (int s = 1; s < NSTAGE; s++) l1[s] = f_stage(s, l2[s-1]);
      for (int s = 0; s < NSTAGE; s++) l2[s] = l1[s];
      expect_q[k+1] = l2[NSTAGE-1];
    end
  end

  int nin [2], nout [2];

  task automatic got(input int u, input logic [W-1:0] v);
    if (nout[u] <= NTOK) begin
      checks++;
      if (v !== expect_q[nout[u]]) begin
        failures++;
        $display("FAIL copy %0d output %0d: got %016h expected %016h", u, nout[u], v,
                 expect_q[nout[u]]);
      end
    end
    nout[u]++;
  endtask

  // Copy 0: two-phase producer and consumer.
  initial begin
    in_req[0] = 1'b0; out_ack[0] = 1'b0;
    forever begin
      @(negedge rst);
      fork
        begin : producer2p
          in_data[0] = stim[0];
          nin[0] = 1;
          forever begin
            wait (in_ack[0] != in_req[0]);
            #($urandom_range(0, 3000) * 0.001);
            in_data[0] = stim[nin[0]];
            nin[0]++;
            in_req[0] = in_ack[0];
          end
        end
        begin : consumer2p
          forever begin
            wait (out_ack[0] == out_req[0]);
            #($urandom_range(0, 3000) * 0.001);
            got(0, out_data[0]);
            out_ack[0] = ~out_req[0];
          end
        end
        @(posedge rst);
      join_any
      disable fork;
    end
  end

  // Copy 1: four-phase producer and consumer, or a free-running clock.
  realtime period = 10.0;
  initial begin
    in_req[1] = 1'b0; out_ack[1] = 1'b0;
    forever begin
      @(negedge rst);
      fork
        begin : producer4p
          in_data[1] = stim[0];
          nin[1] = 1;
          if (clocked) begin
            forever begin
              #(period / 2) in_req[1] = 1'b1;
              #(period / 2) in_data[1] = stim[nin[1]];
              nin[1]++;
              in_req[1] = 1'b0;
            end
          end else begin
            forever begin
              #($urandom_range(0, 3000) * 0.001);
              in_req[1] = 1'b1;
              wait (in_ack[1]);
              #($urandom_range(0, 3000) * 0.001);
              in_data[1] = stim[nin[1]];
              nin[1]++;
              in_req[1] = 1'b0;
              wait (!in_ack[1]);
            end
          end
        end
        begin : consumer4p
          forever begin
            wait (out_req[1]);
            if (!clocked) #($urandom_range(0, 3000) * 0.001);
            else #0.01;
            got(1, out_data[1]);
            out_ack[1] = 1'b1;
            wait (!out_req[1]);
            if (!clocked) #($urandom_range(0, 3000) * 0.001);
            else #0.01;
            out_ack[1] = 1'b0;
          end
        end
        @(posedge rst);
      join_any
      disable fork;
    end
  end

  task automatic start(input logic [1:0] t);
    tap = t;
    rst = 1'b1;
    in_req = '{1'b0, 1'b0};
    out_ack = '{1'b0, 1'b0};
    // The first value must be present while reset is released: the input
    // master latch is transparent and may capture it at once.
    in_data = '{stim[0], stim[0]};
    #1;
    nin = '{0, 0};
    nout = '{0, 0};
    #9 rst = 1'b0;
  endtask

  initial begin
    realtime t0, t_mc, t_sd;
    bit done_mc, done_sd;
    clocked = 1'b0;
    start(2'd0);
    t0 = $realtime;
    done_mc = 0; done_sd = 0;
    while (!(done_mc && done_sd)) begin
      #1;
      if (!done_mc && nout[0] > NTOK) begin done_mc = 1; t_mc = $realtime - t0; end
      if (!done_sd && nout[1] > NTOK) begin done_sd = 1; t_sd = $realtime - t0; end
    end
    $display("handshake runs, %0d results: two-phase concurrent %0.1f ns, four-phase semi-decoupled %0.1f ns",
             NTOK, t_mc, t_sd);
    // Synchronous environment on the four-phase copy.
    period = 4.0 * t_sd / NTOK;
    clocked = 1'b1;
    start(2'd0);
    while (nout[1] <= NTOK) #1;
    $display("clocked input, period %0.2f ns: %0d results", period, nout[1]);
    checks++;
    if (nout[1] <= NTOK) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog: pipeline stalled (outputs %0d %0d)", nout[0], nout[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
