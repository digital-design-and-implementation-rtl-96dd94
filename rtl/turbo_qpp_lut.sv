// turbo_qpp_lut: coefficients f1, f2 of the turbo code internal (QPP)
// interleaver Pi(i) = (f1*i + f2*i^2) mod K, looked up from the block size K.
//
// Combinational. The table holds the rows of the 3GPP interleaver table for
// K = 40 .. 2560, which covers every NB-IoT code block (K = TBS + 24 with TBS at
// most 2536, so no code block segmentation is needed). Rows for K > 2560 are
// left out because the NPUSCH transport block never reaches them. `valid` is
// low for a K that is not a legal block size; f1 and f2 are then zero.
module turbo_qpp_lut (
  input  logic [11:0] k,
  output logic [11:0] f1,
  output logic [11:0] f2,
  output logic        valid
);
  always_comb begin
    valid = 1'b1;
    unique case (k)
      12'd40: begin f1 = 12'd3; f2 = 12'd10; end
      12'd48: begin f1 = 12'd7; f2 = 12'd12; end
      12'd56: begin f1 = 12'd19; f2 = 12'd42; end
      12'd64: begin f1 = 12'd7; f2 = 12'd16; end
      12'd72: begin f1 = 12'd7; f2 = 12'd18; end
      12'd80: begin f1 = 12'd11; f2 = 12'd20; end
      12'd88: begin f1 = 12'd5; f2 = 12'd22; end
      12'd96: begin f1 = 12'd11; f2 = 12'd24; end
      12'd104: begin f1 = 12'd7; f2 = 12'd26; end
      12'd112: begin f1 = 12'd41; f2 = 12'd84; end
      12'd120: begin f1 = 12'd103; f2 = 12'd90; end
      12'd128: begin f1 = 12'd15; f2 = 12'd32; end
      12'd136: begin f1 = 12'd9; f2 = 12'd34; end
      12'd144: begin f1 = 12'd17; f2 = 12'd108; end
      12'd152: begin f1 = 12'd9; f2 = 12'd38; end
      12'd160: begin f1 = 12'd21; f2 = 12'd120; end
      12'd168: begin f1 = 12'd101; f2 = 12'd84; end
      12'd176: begin f1 = 12'd21; f2 = 12'd44; end
      12'd184: begin f1 = 12'd57; f2 = 12'd46; end
      12'd192: begin f1 = 12'd23; f2 = 12'd48; end
      12'd200: begin f1 = 12'd13; f2 = 12'd50; end
      12'd208: begin f1 = 12'd27; f2 = 12'd52; end
      12'd216: begin f1 = 12'd11; f2 = 12'd36; end
      12'd224: begin f1 = 12'd27; f2 = 12'd56; end
      12'd232: begin f1 = 12'd85; f2 = 12'd58; end
      12'd240: begin f1 = 12'd29; f2 = 12'd60; end
      12'd248: begin f1 = 12'd33; f2 = 12'd62; end
      12'd256: begin f1 = 12'd15; f2 = 12'd32; end
      12'd264: begin f1 = 12'd17; f2 = 12'd198; end
      12'd272: begin f1 = 12'd33; f2 = 12'd68; end
      12'd280: begin f1 = 12'd103; f2 = 12'd210; end
      12'd288: begin f1 = 12'd19; f2 = 12'd36; end
      12'd296: begin f1 = 12'd19; f2 = 12'd74; end
      12'd304: begin f1 = 12'd37; f2 = 12'd76; end
      12'd312: begin f1 = 12'd19; f2 = 12'd78; end
      12'd320: begin f1 = 12'd21; f2 = 12'd120; end
      12'd328: begin f1 = 12'd21; f2 = 12'd82; end
      12'd336: begin f1 = 12'd115; f2 = 12'd84; end
      12'd344: begin f1 = 12'd193; f2 = 12'd86; end
      12'd352: begin f1 = 12'd21; f2 = 12'd44; end
      12'd360: begin f1 = 12'd133; f2 = 12'd90; end
      12'd368: begin f1 = 12'd81; f2 = 12'd46; end
      12'd376: begin f1 = 12'd45; f2 = 12'd94; end
      12'd384: begin f1 = 12'd23; f2 = 12'd48; end
      12'd392: begin f1 = 12'd243; f2 = 12'd98; end
      12'd400: begin f1 = 12'd151; f2 = 12'd40; end
      12'd408: begin f1 = 12'd155; f2 = 12'd102; end
      12'd416: begin f1 = 12'd25; f2 = 12'd52; end
      12'd424: begin f1 = 12'd51; f2 = 12'd106; end
      12'd432: begin f1 = 12'd47; f2 = 12'd72; end
      12'd440: begin f1 = 12'd91; f2 = 12'd110; end
      12'd448: begin f1 = 12'd29; f2 = 12'd168; end
      12'd456: begin f1 = 12'd29; f2 = 12'd114; end
      12'd464: begin f1 = 12'd247; f2 = 12'd58; end
      12'd472: begin f1 = 12'd29; f2 = 12'd118; end
      12'd480: begin f1 = 12'd89; f2 = 12'd180; end
      12'd488: begin f1 = 12'd91; f2 = 12'd122; end
      12'd496: begin f1 = 12'd157; f2 = 12'd62; end
      12'd504: begin f1 = 12'd55; f2 = 12'd84; end
      12'd512: begin f1 = 12'd31; f2 = 12'd64; end
      12'd528: begin f1 = 12'd17; f2 = 12'd66; end
      12'd544: begin f1 = 12'd35; f2 = 12'd68; end
      12'd560: begin f1 = 12'd227; f2 = 12'd420; end
      12'd576: begin f1 = 12'd65; f2 = 12'd96; end
      12'd592: begin f1 = 12'd19; f2 = 12'd74; end
      12'd608: begin f1 = 12'd37; f2 = 12'd76; end
      12'd624: begin f1 = 12'd41; f2 = 12'd234; end
      12'd640: begin f1 = 12'd39; f2 = 12'd80; end
      12'd656: begin f1 = 12'd185; f2 = 12'd82; end
      12'd672: begin f1 = 12'd43; f2 = 12'd252; end
      12'd688: begin f1 = 12'd21; f2 = 12'd86; end
      12'd704: begin f1 = 12'd155; f2 = 12'd44; end
      12'd720: begin f1 = 12'd79; f2 = 12'd120; end
      12'd736: begin f1 = 12'd139; f2 = 12'd92; end
      12'd752: begin f1 = 12'd23; f2 = 12'd94; end
      12'd768: begin f1 = 12'd217; f2 = 12'd48; end
      12'd784: begin f1 = 12'd25; f2 = 12'd98; end
      12'd800: begin f1 = 12'd17; f2 = 12'd80; end
      12'd816: begin f1 = 12'd127; f2 = 12'd102; end
      12'd832: begin f1 = 12'd25; f2 = 12'd52; end
      12'd848: begin f1 = 12'd239; f2 = 12'd106; end
      12'd864: begin f1 = 12'd17; f2 = 12'd48; end
      12'd880: begin f1 = 12'd137; f2 = 12'd110; end
      12'd896: begin f1 = 12'd215; f2 = 12'd112; end
      12'd912: begin f1 = 12'd29; f2 = 12'd114; end
      12'd928: begin f1 = 12'd15; f2 = 12'd58; end
      12'd944: begin f1 = 12'd147; f2 = 12'd118; end
      12'd960: begin f1 = 12'd29; f2 = 12'd60; end
      12'd976: begin f1 = 12'd59; f2 = 12'd122; end
      12'd992: begin f1 = 12'd65; f2 = 12'd124; end
      12'd1008: begin f1 = 12'd55; f2 = 12'd84; end
      12'd1024: begin f1 = 12'd31; f2 = 12'd64; end
      12'd1056: begin f1 = 12'd17; f2 = 12'd66; end
      12'd1088: begin f1 = 12'd171; f2 = 12'd204; end
      12'd1120: begin f1 = 12'd67; f2 = 12'd140; end
      12'd1152: begin f1 = 12'd35; f2 = 12'd72; end
      12'd1184: begin f1 = 12'd19; f2 = 12'd74; end
      12'd1216: begin f1 = 12'd39; f2 = 12'd76; end
      12'd1248: begin f1 = 12'd19; f2 = 12'd78; end
      12'd1280: begin f1 = 12'd199; f2 = 12'd240; end
      12'd1312: begin f1 = 12'd21; f2 = 12'd82; end
      12'd1344: begin f1 = 12'd211; f2 = 12'd252; end
      12'd1376: begin f1 = 12'd21; f2 = 12'd86; end
      12'd1408: begin f1 = 12'd43; f2 = 12'd88; end
      12'd1440: begin f1 = 12'd149; f2 = 12'd60; end
      12'd1472: begin f1 = 12'd45; f2 = 12'd92; end
      12'd1504: begin f1 = 12'd49; f2 = 12'd846; end
      12'd1536: begin f1 = 12'd71; f2 = 12'd48; end
      12'd1568: begin f1 = 12'd13; f2 = 12'd28; end
      12'd1600: begin f1 = 12'd17; f2 = 12'd80; end
      12'd1632: begin f1 = 12'd25; f2 = 12'd102; end
      12'd1664: begin f1 = 12'd183; f2 = 12'd104; end
      12'd1696: begin f1 = 12'd55; f2 = 12'd954; end
      12'd1728: begin f1 = 12'd127; f2 = 12'd96; end
      12'd1760: begin f1 = 12'd27; f2 = 12'd110; end
      12'd1792: begin f1 = 12'd29; f2 = 12'd112; end
      12'd1824: begin f1 = 12'd29; f2 = 12'd114; end
      12'd1856: begin f1 = 12'd57; f2 = 12'd116; end
      12'd1888: begin f1 = 12'd45; f2 = 12'd354; end
      12'd1920: begin f1 = 12'd31; f2 = 12'd120; end
      12'd1952: begin f1 = 12'd59; f2 = 12'd610; end
      12'd1984: begin f1 = 12'd185; f2 = 12'd124; end
      12'd2016: begin f1 = 12'd113; f2 = 12'd420; end
      12'd2048: begin f1 = 12'd31; f2 = 12'd64; end
      12'd2112: begin f1 = 12'd17; f2 = 12'd66; end
      12'd2176: begin f1 = 12'd171; f2 = 12'd136; end
      12'd2240: begin f1 = 12'd209; f2 = 12'd420; end
      12'd2304: begin f1 = 12'd253; f2 = 12'd216; end
      12'd2368: begin f1 = 12'd367; f2 = 12'd444; end
      12'd2432: begin f1 = 12'd265; f2 = 12'd456; end
      12'd2496: begin f1 = 12'd181; f2 = 12'd468; end
      12'd2560: begin f1 = 12'd39; f2 = 12'd80; end      default: begin f1 = 12'd0; f2 = 12'd0; valid = 1'b0; end
    endcase
  end
endmodule
