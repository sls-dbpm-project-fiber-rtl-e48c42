// tb_lp_sender - testbench model of a SHARC link port configured as
// transmitter (link port 3 or 4). While enabled it sends numbered words
// {SEED, ~index[7:0], index[15:0]}, each only when LACK is high, as eight
// nibbles (most significant first) renewed on the rising LCLK edge; LCLK runs
// at the DSP clock and idles low. With ignore_lack set it sends regardless.
module tb_lp_sender #(
  parameter logic [7:0] SEED = 8'h00
) (
  input  logic       sclk,
  input  logic       enable,
  input  logic       ignore_lack,
  input  logic       lack,
  output logic       lclk,
  output logic [3:0] ldat,
  output int         sent
);
  initial begin
    lclk = 0; ldat = '0; sent = 0;
    forever begin
      @(posedge sclk);
      if (enable && (lack || ignore_lack)) begin
        logic [31:0] w;
        w = {SEED, ~8'(sent), 16'(sent)};
        for (int i = 7; i >= 0; i--) begin
          if (i != 7) @(posedge sclk);
          lclk <= 1'b1; ldat <= w[4*i +: 4];
          @(negedge sclk); lclk <= 1'b0;
        end
        sent++;
      end
    end
  end
endmodule
