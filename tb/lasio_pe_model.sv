// lasio_pe_model - behavioural processing element for the mesh testbenches.
//
// Generates the all-to-all traffic: the PE creates one 8-flit packet for
// every other node, in node order 0, 1, 2, ... (skipping itself), at an
// injection rate of rate_pct percent: an accumulator gains rate_pct every
// cycle and a packet is created each time it passes 100, so 32% creates a
// packet about every third cycle. Created packets wait in the PE and are
// sent flit by flit on the valid/ready link as fast as the router takes
// them. Packet: header (destination address), size flit (6), then
// source node, destination node, creation time (low, high 16 bits), a check
// word and a sequence tag.
//
// The receiving side always accepts flits (or stalls at random when
// STALL_PCT > 0) and checks every packet: right destination, size, check
// word, and that each source arrives exactly once. Packet latency is the
// time from creation to the acceptance of the last flit.
module lasio_pe_model
  import lasio_pkg::*;
#(
  parameter int unsigned ME        = 0,
  parameter int unsigned X_SIZE    = 2,
  parameter int unsigned Y_SIZE    = 2,
  parameter int unsigned Z_SIZE    = 2,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] now,
  input  int unsigned rate_pct,
  output link_t       tx,
  input  logic        tx_ready,
  input  link_t       rx,
  output logic        rx_ready,
  output int unsigned sent,
  output int unsigned received,
  output int unsigned errors,
  output longint unsigned lat_sum,
  output int unsigned lat_max
);
  localparam int unsigned N = X_SIZE * Y_SIZE * Z_SIZE;

  function automatic addr_t addr_of(input int unsigned n);
    addr_t a;
    a.z = COORD_W'(n % Z_SIZE);
    a.y = COORD_W'((n / Z_SIZE) % Y_SIZE);
    a.x = COORD_W'(n / (Y_SIZE * Z_SIZE));
    return a;
  endfunction

  // ---------------- transmit side ----------------
  int unsigned acc;
  int unsigned created;         // packets created so far
  int unsigned next_dst;        // destination of the next packet to create
  logic [31:0] ctime [$];       // creation times of waiting packets
  int unsigned qdst  [$];
  logic [FLIT_W-1:0] pkt [8];
  int unsigned fidx;
  logic        busy;

  function automatic int unsigned skip_self(input int unsigned d);
    return (d == ME) ? d + 1 : d;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      acc      <= 0;
      created  <= 0;
      next_dst <= skip_self(0);
      sent     <= 0;
      fidx     <= 0;
      busy     <= 1'b0;
      tx       <= '0;
      ctime.delete();
      qdst.delete();
    end else begin
      // application: create packets at the injection rate
      if (created < N - 1) begin
        if (acc + rate_pct >= 100) begin
          acc      <= acc + rate_pct - 100;
          ctime.push_back(now);
          qdst.push_back(next_dst);
          created  <= created + 1;
          next_dst <= skip_self(next_dst + 1);
        end else begin
          acc <= acc + rate_pct;
        end
      end
      // network interface: send flits
      if (tx.valid && tx_ready) begin
        if (fidx == 7) begin
          busy <= 1'b0;
          sent <= sent + 1;
          tx.valid <= 1'b0;
        end else begin
          fidx    <= fidx + 1;
          tx.data <= pkt[fidx+1];
        end
      end
      if ((!busy || (tx.valid && tx_ready && fidx == 7)) && ctime.size() > 0) begin
        logic [31:0] t;
        int unsigned d;
        t = ctime.pop_front();
        d = qdst.pop_front();
        pkt[0] = make_header(addr_of(d));
        pkt[1] = 16'd6;
        pkt[2] = 16'(ME);
        pkt[3] = 16'(d);
        pkt[4] = t[15:0];
        pkt[5] = t[31:16];
        pkt[6] = 16'(ME) ^ 16'(d << 8) ^ 16'hA5A5;
        pkt[7] = 16'hC000 | 16'(d);
        busy     <= 1'b1;
        fidx     <= 0;
        tx.valid <= 1'b1;
        tx.data  <= pkt[0];
      end
    end
  end

  // ---------------- receive side ----------------
  logic [FLIT_W-1:0] rpkt [8];
  int unsigned ridx;
  bit          seen [N];

  always @(posedge clk) begin
    if (!rst_n) begin
      rx_ready <= 1'b1;
      ridx     <= 0;
      received <= 0;
      errors   <= 0;
      lat_sum  <= 0;
      lat_max  <= 0;
      for (int i = 0; i < N; i++) seen[i] <= 1'b0;
    end else begin
      if (STALL_PCT > 0) rx_ready <= (($urandom % 100) >= STALL_PCT);
      if (rx.valid && rx_ready) begin
        rpkt[ridx] = rx.data;
        if (ridx == 7) begin
          int unsigned src, lat;
          logic [31:0] t;
          src = int'(rpkt[2]);
          t   = {rpkt[5], rpkt[4]};
          lat = now - t + 1;
          ridx <= 0;
          received <= received + 1;
          lat_sum  <= lat_sum + lat;
          if (lat > lat_max) lat_max <= lat;
          if (rpkt[0] !== make_header(addr_of(ME)) || rpkt[1] !== 16'd6 ||
              rpkt[3] !== 16'(ME) || src >= N || src == ME ||
              rpkt[6] !== (16'(src) ^ 16'(ME << 8) ^ 16'hA5A5) ||
              rpkt[7] !== (16'hC000 | 16'(ME)) || seen[src]) begin
            errors <= errors + 1;
            $display("PE %0d: bad packet %h %h %h %h %h %h %h %h", ME,
                     rpkt[0], rpkt[1], rpkt[2], rpkt[3], rpkt[4], rpkt[5], rpkt[6], rpkt[7]);
          end else begin
            seen[src] <= 1'b1;
          end
        end else begin
          ridx <= ridx + 1;
        end
      end
    end
  end

endmodule
