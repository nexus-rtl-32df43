// nx_bist: built-in self test assist module on one crossbar port.
//
// It lets the interconnect test itself at full speed without a tester
// driving every port. Started with a burst length, a seed, a count of
// iterations and two port numbers A and B, it launches one burst to port A.
// Ports A and B run their converters in loopback mode (nx_loopback), which
// takes the next hop from the low CTRL_W bits of the first word and puts the
// arriving FROM there instead. The launched first word carries B, so the
// burst goes BIST -> A -> B -> BIST. Each time the burst comes back the
// BIST bounces it out again in the same way (new TO = low data bits, low
// data bits = FROM), which sends it to A carrying B once more. After `iters`
// round trips the returning burst is absorbed and compared with what it must
// be after an even number of swaps: first word {seed[DATA_W-1:CTRL_W], A}
// with FROM = B, word k (k>0) = seed + k, tail only on word len-1.
//
// A fault that breaks a link usually stops the burst; that shows as `done`
// never rising. A fault that corrupts data sets `error`. Comparing inside
// the module, and the seed+k pattern, are own choices; the original leaves
// the final burst to be read out on the synchronous side.
// Runs on the fabric clock. Outputs pass through pipelined repeaters so the
// module adds no combinational path from its input port to its output port.
module nx_bist #(
  parameter int unsigned DATA_W = nexus_pkg::NX_DATA_W,
  parameter int unsigned CTRL_W = nexus_pkg::NX_CTRL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration and status
  input  logic              start,
  input  logic [CTRL_W-1:0] port_a,
  input  logic [CTRL_W-1:0] port_b,
  input  logic [7:0]        iters,     // round trips, 0 is taken as 1
  input  logic [3:0]        len,       // words per burst, 0 is taken as 1
  input  logic [DATA_W-1:0] seed,
  output logic              busy,
  output logic              done,
  output logic              error,
  output logic [7:0]        trips,     // round trips completed
  // toward the crossbar input
  output logic              x_out_valid,
  input  logic              x_out_ready,
  output logic [DATA_W-1:0] x_out_data,
  output logic              x_out_tail,
  output logic              to_valid,
  input  logic              to_ready,
  output logic [CTRL_W-1:0] to_port,
  // from the crossbar output
  input  logic              x_in_valid,
  output logic              x_in_ready,
  input  logic [DATA_W-1:0] x_in_data,
  input  logic              x_in_tail,
  input  logic              from_valid,
  output logic              from_ready,
  input  logic [CTRL_W-1:0] from_port
);

  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_BOUNCE, S_DONE} state_t;
  state_t st;

  logic              o_valid, o_ready, o_tail, t_valid, t_ready;
  logic [DATA_W-1:0] o_data;
  logic [CTRL_W-1:0] t_port;
  logic [3:0]        k, last_k;
  logic [7:0]        last_trip;
  logic              first, to_done, final_trip;
  logic [DATA_W-1:0] exp_data;
  logic              exp_tail, in_fire;

  assign last_k     = (len == 0) ? 4'd0 : len - 4'd1;
  assign last_trip  = (iters == 0) ? 8'd0 : iters - 8'd1;
  assign final_trip = (trips == last_trip);
  assign busy       = (st == S_LAUNCH) || (st == S_BOUNCE);

  // expected returning word
  assign exp_data = (k == 0) ? {seed[DATA_W-1:CTRL_W], port_a} : seed + DATA_W'(k);
  assign exp_tail = (k == last_k);

  always_comb begin
    o_valid    = 1'b0;
    o_data     = '0;
    o_tail     = 1'b0;
    t_valid    = 1'b0;
    t_port     = '0;
    x_in_ready = 1'b0;
    from_ready = 1'b0;
    case (st)
      S_LAUNCH: begin
        t_valid = first & ~to_done;
        t_port  = port_a;
        o_valid = ~first | to_done;
        o_data  = (k == 0) ? {seed[DATA_W-1:CTRL_W], port_b} : seed + DATA_W'(k);
        o_tail  = (k == last_k);
      end
      S_BOUNCE: begin
        if (final_trip) begin
          x_in_ready = ~first | from_valid;
          from_ready = first & x_in_valid;
        end else begin
          t_valid    = first & ~to_done & x_in_valid & from_valid;
          t_port     = x_in_data[CTRL_W-1:0];
          o_valid    = x_in_valid & (~first | to_done);
          o_data     = x_in_data;
          if (first) o_data[CTRL_W-1:0] = from_port;
          o_tail     = x_in_tail;
          x_in_ready = o_ready & (~first | to_done);
          from_ready = first & to_done & x_in_valid & o_ready;
        end
      end
      default: ;
    endcase
  end

  assign in_fire = x_in_valid & x_in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      k       <= '0;
      first   <= 1'b1;
      to_done <= 1'b0;
      trips   <= '0;
      done    <= 1'b0;
      error   <= 1'b0;
    end else begin
      if (t_valid && t_ready) to_done <= 1'b1;
      case (st)
        S_IDLE, S_DONE: if (start) begin
          st      <= S_LAUNCH;
          k       <= '0;
          first   <= 1'b1;
          to_done <= 1'b0;
          trips   <= '0;
          done    <= 1'b0;
          error   <= 1'b0;
        end
        S_LAUNCH: if (o_valid && o_ready) begin
          first   <= o_tail;
          to_done <= 1'b0;
          k       <= o_tail ? '0 : k + 4'd1;
          if (o_tail) st <= S_BOUNCE;
        end
        S_BOUNCE: if (in_fire) begin
          first   <= x_in_tail;
          to_done <= 1'b0;
          k       <= x_in_tail ? '0 : k + 4'd1;
          if (final_trip) begin
            if (x_in_data != exp_data || x_in_tail != exp_tail ||
                (first && from_port != port_b))
              error <= 1'b1;
          end
          if (x_in_tail) begin
            trips <= trips + 8'd1;
            if (final_trip) begin
              st   <= S_DONE;
              done <= 1'b1;
            end
          end
        end
        default: ;
      endcase
    end
  end

  nx_pipelined_repeater #(.W(DATA_W + 1)) u_out (
    .clk, .rst_n,
    .in_valid(o_valid), .in_ready(o_ready), .in_data({o_tail, o_data}),
    .out_valid(x_out_valid), .out_ready(x_out_ready), .out_data({x_out_tail, x_out_data})
  );

  nx_pipelined_repeater #(.W(CTRL_W)) u_to (
    .clk, .rst_n,
    .in_valid(t_valid), .in_ready(t_ready), .in_data(t_port),
    .out_valid(to_valid), .out_ready(to_ready), .out_data(to_port)
  );

endmodule
