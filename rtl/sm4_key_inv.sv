// sm4_key_inv: key inversion for decryption. SM4 decryption is encryption
// with the round keys in reverse order, so round i of the shared pipeline
// must receive rk[31-i]. The keys are moved through a triangle of registers:
// output lane i is a chain of i+1 registers, so after a load the inverted key
// for round 0 is ready one cycle later, the one for round 1 a cycle after
// that, and so on: each clock the next column of the triangle delivers its
// bottom key. A key change therefore reaches round i exactly when a block
// that entered the pipeline together with the change reaches round i, and the
// pipeline never has to be drained.
//
// Interface: pulse load with rk_in (the encryption round keys). rk_out[i] is
// the key for decryption round i; ready[i] rises i+1 cycles after the load and
// stays high until the next load. Lane lengths 1..32 are this design's choice
// of triangle; the published design shows the triangle but not its exact
// register count.
module sm4_key_inv
  import securecomm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  rkset_t rk_in,
  output rkset_t rk_out,
  output logic [31:0] ready
);
  for (genvar i = 0; i < 32; i++) begin : g_lane
    word_t      key_q [i+1];
    logic [i:0] rdy_q;

    always_ff @(posedge clk) begin
      if (load) key_q[0] <= rk_in[31-i];
      for (int j = 1; j <= i; j++) key_q[j] <= key_q[j-1];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    rdy_q <= '0;
      else if (load) rdy_q <= (i + 1)'(1);
      else if (i == 0) rdy_q <= rdy_q;
      else           rdy_q <= (i + 1)'({rdy_q, rdy_q[0]});
    end

    assign rk_out[i] = key_q[i];
    assign ready[i]  = rdy_q[i];
  end
endmodule
