// lc3_memory_model: behavioural model of a 64K x 16-bit memory slower than
// the clock, used only to exercise the control unit in simulation.
//
// An access starts when mio_en is high. After a random number of extra
// cycles (0 to MAX_LAT) the memory raises ready (the LC-3 signal R) for
// one cycle; read data is valid while ready is high, and a write takes
// effect at the clock edge at which ready is high. stall_cycles counts the
// cycles in which an access was pending but not ready.
module lc3_memory_model #(
  parameter int unsigned MAX_LAT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mio_en,
  input  logic        r_w,       // 1 = write
  input  logic [15:0] addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        ready,
  output int unsigned stall_cycles
);

  logic [15:0] m [65536];
  int unsigned waited, latency;

  assign ready = mio_en && (waited >= latency);
  assign rdata = m[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waited       <= 0;
      latency      <= 0;
      stall_cycles <= 0;
    end else if (mio_en) begin
      if (ready) begin
        if (r_w) m[addr] <= wdata;
        waited  <= 0;
        latency <= $urandom_range(0, MAX_LAT);
      end else begin
        waited       <= waited + 1;
        stall_cycles <= stall_cycles + 1;
      end
    end else begin
      waited <= 0;
    end
  end

endmodule
