// datagen_out: test-vector generator, run control and output cache.
//
// The engine runs at one clock per biquad step; test samples advance once per
// frame of FRAME clocks (one frame = all stages of one sample). A frame counter
// marks the last clock of each frame (the frame tick).
// Run control: ini_rst (new candidate loaded) restarts the frame counter and is
// held until the frame tick, where the run starts. The LFSR then restarts from
// its seed, so every candidate sees the identical test sequence, and one 32-bit
// pseudo-random word (read as fix_32_29) is produced per frame for N_VEC frames.
// pseudo_data is zero whenever no run is active.
// Output cache: the filter result for the vector presented in frame f is valid on
// dout_ramin at the tick that ends frame f+RES_LAT. At that tick it is written to
// an N_VEC x 34 single-port RAM at the vector's index; the RAM's write-first read
// port drives dout, and outen is high for that one clock. outend goes high
// together with the result of the last vector and stays high until the next ini_rst.
// Timing: ini_rst in cycle c -> frame counter 0 in cycle c+1 -> first vector on
// pseudo_data from cycle c+FRAME+1. RES_LAT = 2 matches the data path of
// iir_accel_top (one frame through the g multiplier and stage 0, one frame in the
// output register of the I/O controller).
// The LFSR, the 2048-vector run, the 2048 x 34 cache, the zero mux on the outputs
// and the wait for the end of the frame follow the original design; the counter
// alignment with ini_rst and the result-latency pipeline are this design's choices.
module datagen_out
  import iir_pkg::*;
#(
  parameter int unsigned N_VEC   = N_VECTORS,
  parameter int unsigned FRAME   = FRAME_LEN,
  parameter int unsigned RES_LAT = 2,
  parameter logic [31:0] SEED    = 32'h0000_0000
) (
  input  logic  clk,
  input  logic  rst,          // synchronous power-on reset
  input  out_t  dout_ramin,   // filter result, fix_34_29
  input  logic  ini_rst,      // new candidate: restart
  output out_t  dout,         // cached result
  output logic  outen,        // dout valid (one clock per result)
  output coef_t pseudo_data,  // test vector, fix_32_29
  output logic  outend        // all N_VEC results delivered
);

  localparam int unsigned AW = (N_VEC > 1) ? $clog2(N_VEC) : 1;
  localparam int unsigned FW = $clog2(FRAME);

  logic [FW-1:0] fcnt;
  logic          tick;
  logic          pend;
  logic          running;
  logic [AW-1:0] vec_cnt;
  logic          lfsr_load, lfsr_en;
  logic [31:0]   lfsr_q;

  logic          vd [RES_LAT];
  logic [AW-1:0] ad [RES_LAT];
  logic          ram_we;
  logic [AW-1:0] ram_addr;
  out_t          cache [N_VEC];
  out_t          ram_q;

  always_comb begin
    tick      = (fcnt == FW'(FRAME - 1));
    lfsr_load = tick && pend && !ini_rst;
    lfsr_en   = tick && running && !pend && !ini_rst;
    ram_we    = tick && vd[RES_LAT-1] && !ini_rst;
    ram_addr  = ad[RES_LAT-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fcnt    <= '0;
      pend    <= 1'b0;
      running <= 1'b0;
      vec_cnt <= '0;
      for (int i = 0; i < RES_LAT; i++) begin
        vd[i] <= 1'b0;
        ad[i] <= '0;
      end
    end else if (ini_rst) begin
      fcnt    <= '0;
      pend    <= 1'b1;
      running <= 1'b0;
      vec_cnt <= '0;
      for (int i = 0; i < RES_LAT; i++) vd[i] <= 1'b0;
    end else begin
      fcnt <= tick ? '0 : fcnt + 1'b1;
      if (tick) begin
        vd[0] <= running;
        ad[0] <= vec_cnt;
        for (int i = 1; i < RES_LAT; i++) begin
          vd[i] <= vd[i-1];
          ad[i] <= ad[i-1];
        end
        if (pend) begin
          pend    <= 1'b0;
          running <= 1'b1;
          vec_cnt <= '0;
        end else if (running) begin
          if (vec_cnt == AW'(N_VEC - 1)) running <= 1'b0;
          else                           vec_cnt <= vec_cnt + 1'b1;
        end
      end
    end
  end

  lfsr32 #(.SEED(SEED)) u_lfsr (
    .clk  (clk),
    .rst  (rst),
    .load (lfsr_load),
    .en   (lfsr_en),
    .q    (lfsr_q)
  );

  always_comb pseudo_data = running ? coef_t'(lfsr_q) : '0;

  // Output cache, write-first single-port RAM.
  always_ff @(posedge clk) begin
    if (ram_we) begin
      cache[ram_addr] <= dout_ramin;
      ram_q           <= dout_ramin;
    end else begin
      ram_q           <= cache[ram_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (rst || ini_rst) begin
      outen  <= 1'b0;
      outend <= 1'b0;
    end else begin
      outen <= ram_we;
      if (ram_we && (ram_addr == AW'(N_VEC - 1))) outend <= 1'b1;
    end
  end

  always_comb dout = outen ? ram_q : '0;

endmodule
