// Unit test of packet_fifo (the 16-entry packet queue).
//
// A producer and a consumer with random valid/ready are compared with a queue
// model: in_ready is low exactly when 16 packets are held, out_valid exactly
// when one is held, and packets come out unchanged and in order. Phases
// favour filling and draining so that both limits are reached.
module tb_packet_fifo;
  import qos_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    in_valid = 0, in_ready, out_valid, out_ready = 0;
  packet_t in_data = '0, out_data;

  packet_fifo dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_out = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  packet_t q[$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 10000; n++) begin
      automatic bit fill = ((n / 500) % 2 == 0);
      in_valid  = ($urandom % 4 < (fill ? 3 : 1));
      out_ready = ($urandom % 4 < (fill ? 1 : 3));
      in_data   = packet_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                             $urandom, $urandom, $urandom, $urandom, $urandom});
      #1;
      check(in_ready == (q.size() < 16), "in_ready");
      check(out_valid == (q.size() > 0), "out_valid");
      if (q.size() == 16) n_full++;
      if (out_valid && out_ready) begin
        check(out_data == q[0], "packet order and contents");
        void'(q.pop_front());
        n_out++;
      end
      if (in_valid && in_ready) q.push_back(in_data);
      @(negedge clk);
    end
    check(n_full > 10 && n_out > 1000, "full queue and traffic exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
