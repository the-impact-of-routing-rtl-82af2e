// tb_lasio_input_buffer - checks the input port's FIFO and packet framing.
//
// 1. An 8-flit packet is written; the port must request with the header's
//    destination one cycle later, hold its flits back until grant, then
//    deliver them in order and flag eop exactly on the last one.
// 2. With no pops the port takes exactly DEPTH flits, then drops ready.
// 3. A 2-flit packet (size flit 0) ends at its size flit.
// 4. A packet is streamed in while the previous one drains, with random
//    pop stalls, and the order of all flits is checked.
module tb_lasio_input_buffer;
  import lasio_pkg::*;

  localparam int unsigned DEPTH = 8;

  logic              clk = 0, rst_n = 0;
  link_t             in;
  logic              in_ready, req, grant, flit_valid, pop, eop;
  addr_t             req_dst;
  logic [FLIT_W-1:0] flit_data;
  int checks = 0, failures = 0;

  lasio_input_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic push(input logic [FLIT_W-1:0] d);
    in.valid = 1'b1; in.data = d;
    @(posedge clk); #1;
    in.valid = 1'b0;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [FLIT_W-1:0] q [$];

  initial begin
    in = '0; grant = 0; pop = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    expect_eq("idle req", req, 0);
    expect_eq("idle ready", in_ready, 1);

    // ---- 1: one packet, grant, in-order delivery, eop on the last flit
    push(16'h0123);                 // header: x=1 y=2 z=3
    expect_eq("req after header", req, 1);
    expect_eq("req_dst", req_dst, 12'h123);
    expect_eq("held before grant", flit_valid, 0);
    push(16'd6);
    for (int i = 0; i < 6; i++) push(16'hB000 + 16'(i));
    expect_eq("still requesting", req, 1);
    pop = 1;
    expect_eq("no flit before grant", flit_valid, 0);
    grant = 1; @(posedge clk); #1; grant = 0;
    expect_eq("req dropped after grant", req, 0);
    for (int i = 0; i < 8; i++) begin
      logic [FLIT_W-1:0] exp;
      exp = (i == 0) ? 16'h0123 : (i == 1) ? 16'd6 : 16'hB000 + 16'(i - 2);
      expect_eq("flit valid", flit_valid, 1);
      expect_eq("flit data", flit_data, exp);
      expect_eq("eop", eop, (i == 7));
      @(posedge clk); #1;
    end
    expect_eq("empty after packet", flit_valid, 0);
    pop = 0;

    // ---- 2: fill to DEPTH without pops
    for (int i = 0; i < DEPTH; i++) begin
      expect_eq("ready while filling", in_ready, 1);
      push((i == 0) ? 16'h0001 : (i == 1) ? 16'd20 : 16'h7000 + 16'(i));
    end
    expect_eq("full", in_ready, 0);
    grant = 1; @(posedge clk); #1; grant = 0;
    pop = 1;
    @(posedge clk); #1;
    expect_eq("ready after a pop", in_ready, 1);
    // drain the rest of this long packet: 7 in FIFO, 20 payload total
    for (int i = 0; i < 13; i++) push(16'h7100 + 16'(i));
    repeat (8) @(posedge clk);
    #1 expect_eq("long packet not yet ended", req, 0);
    pop = 0;

    // ---- 3: a 2-flit packet right after a packet without header gap
    // (reset for a clean start)
    rst_n = 0; @(posedge clk); #1; rst_n = 1;
    push(16'h0200); push(16'd0);
    expect_eq("short req", req, 1);
    grant = 1; @(posedge clk); #1; grant = 0;
    pop = 1;
    expect_eq("short header eop", eop, 0);
    @(posedge clk); #1;
    expect_eq("short size flit eop", eop, 1);
    @(posedge clk); #1;
    pop = 0;

    // ---- 4: streaming with random pop stalls
    q.delete();
    fork
      begin
        for (int p = 0; p < 4; p++) begin
          for (int i = 0; i < 8; i++) begin
            logic [FLIT_W-1:0] d;
            bit taken;
            d = (i == 0) ? 16'h0300 + 16'(p) : (i == 1) ? 16'd6 : 16'(p * 16 + i);
            in.valid = 1'b1; in.data = d;
            q.push_back(d);
            do begin
              @(negedge clk);
              taken = in_ready;
              @(posedge clk); #1;
            end while (!taken);
          end
        end
        in.valid = 1'b0;
      end
      begin
        int got = 0;
        int eops = 0;
        while (got < 32) begin
          @(negedge clk);
          if (req) begin
            grant = 1; @(posedge clk); #1; grant = 0;
          end else begin
            pop = ($urandom % 3 != 0);
            #1;
            if (flit_valid && pop) begin
              logic [FLIT_W-1:0] e;
              e = q.pop_front();
              expect_eq("stream order", flit_data, e);
              if (eop) eops++;
              got++;
            end
            @(posedge clk); #1;
          end
        end
        expect_eq("stream eops", eops, 4);
        pop = 0;
      end
    join

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
