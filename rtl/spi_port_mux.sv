// spi_port_mux: connects the interconnect's single SPI controller to one of
// N_MCU attached MCUs, each of which has its own SCLK/CS_n/MOSI/MISO wires.
//
// Only one MCU uses the interconnect at a time. An idle mux grants the
// lowest-numbered port whose CS_n is low and which was not refused before;
// the grant holds until that port raises CS_n. A port that lowers CS_n while
// another one is served is refused for the rest of its transaction: it reads
// 0x00 on MISO, sees collision, and must raise CS_n and try again. The number
// of the served port is given as req_id, which the memory controller uses as
// the caller's identity. CS_n is synchronised with two flops; the MCU must wait
// at least 8 system clocks after lowering CS_n before its first SCLK edge.
// Everything here is this design's own choice; the document says only that a
// variable number of MCUs share the interconnect over SPI, one at a time.
module spi_port_mux #(
  parameter int unsigned N_MCU = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // per-MCU SPI pins
  input  logic [N_MCU-1:0]         p_sclk,
  input  logic [N_MCU-1:0]         p_cs_n,
  input  logic [N_MCU-1:0]         p_mosi,
  output logic [N_MCU-1:0]         p_miso,
  // towards the SPI controller
  output logic                     s_sclk,
  output logic                     s_cs_n,
  output logic                     s_mosi,
  input  logic                     s_miso,
  // served port
  output logic                     granted,
  output logic [$clog2(N_MCU+1)-1:0] req_id,
  output logic [N_MCU-1:0]         collision
);

  localparam int unsigned IDW = $clog2(N_MCU + 1);

  logic [N_MCU-1:0] cs_m, cs_s, armed;
  logic             found;
  logic [IDW-1:0]   pick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_m <= '1;
      cs_s <= '1;
    end else begin
      cs_m <= p_cs_n;
      cs_s <= cs_m;
    end
  end

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int i = N_MCU - 1; i >= 0; i--) begin
      if (!cs_s[i] && armed[i]) begin
        found = 1'b1;
        pick  = IDW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      granted <= 1'b0;
      req_id  <= '0;
      armed   <= '1;
    end else begin
      for (int i = 0; i < N_MCU; i++) begin
        if (cs_s[i]) begin
          armed[i] <= 1'b1;
        end else if (granted && (IDW'(i) != req_id)) begin
          armed[i] <= 1'b0;
        end
      end
      if (granted) begin
        if (cs_s[req_id]) granted <= 1'b0;
      end else if (found) begin
        granted <= 1'b1;
        req_id  <= pick;
      end
    end
  end

  always_comb begin
    collision = '0;
    for (int i = 0; i < N_MCU; i++) begin
      collision[i] = ~cs_s[i] & ~armed[i];
    end
  end

  always_comb begin
    s_sclk = 1'b0;
    s_cs_n = 1'b1;
    s_mosi = 1'b0;
    p_miso = '0;
    if (granted) begin
      s_sclk         = p_sclk[req_id];
      s_cs_n         = p_cs_n[req_id];
      s_mosi         = p_mosi[req_id];
      p_miso[req_id] = s_miso;
    end
  end

  // MISO reaches at most the one served MCU
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(p_miso));

endmodule
