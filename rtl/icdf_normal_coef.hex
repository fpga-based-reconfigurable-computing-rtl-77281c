fffff4560001922ffff53553
fffff71400017af8fff6bbe6
fffff92c00016933fff82dfe
fffffad800015b99fff99066
fffffc3a00015150fffae6de
fffffd6c000149cafffc346f
fffffe7f000144a6fffd7bab
ffffff82000141a6fffebed5
fffff3e80001365dffed9833
fffff64200011e49ffeec284
fffff7ff00010adfffefd719
fffff9530000faebfff0d9ff
fffffa5c0000ed9afff1ce42
fffffb300000e259fff2b63c
fffffbdc0000d8bdfff393c8
fffffc6a0000d079fff46865
fffff4ad000103b5ffe77445
fffff6d40000ed29ffe86cb2
fffff86a0000dae2ffe950b8
fffff99e0000cbc2ffea240a
fffffa8e0000bf07ffeae970
fffffb4c0000b429ffeba309
fffffbe60000aac6ffec5281
fffffc640000a296ffecf930
fffff5810000e2e0ffe23246
fffff7800000cdfbffe30ab3
fffff8f70000bd0bffe3d036
fffffa140000af05ffe4863e
fffffaf10000a335ffe52f5c
fffffba10000991dffe5cd86
fffffc2e00009062ffe66246
fffffca2000088c2ffe6eed9
fffff63d0000cb8bffdd89c1
fffff8190000b81bffde4b92
fffff9780000a85cffdefbcd
fffffa8100009b55ffdf9da6
fffffb4f0000905effe03381
fffffbf200008701ffe0bf31
fffffc7500007ee9ffe14227
fffffce1000077d7ffe1bd87
fffff6dc0000b9eeffd951b3
fffff89c0000a7bcffda0287
fffff9e500009902ffdaa2e6
fffffade00008cd6ffdb35d2
fffffb9f0000829affdbbd8b
fffffc38000079ddffdc3bc7
fffffcb300007252ffdcb1df
fffffd1800006bbbffdd20e7
fffff7640000ac10ffd57062
fffff90c00009aecffd613df
fffffa4300008d11ffd6a7de
fffffb2e0000819fffd72f36
fffffbe400007802ffd7ac08
fffffc7400006fceffd81ff0
fffffce8000068baffd88c35
fffffd470000628dffd8f1d9
fffff7d90000a0ccffd1d476
fffff96b00009090ffd26d23
fffffa9300008374ffd2f725
fffffb72000078a2ffd37530
fffffc1f00006f8cffd3e947
fffffca7000067cdffd454f4
fffffd150000611fffd4b96b
fffffd6f00005b4cffd517a1
fffff83e0000976cffce719b
fffff9be000087faffcf014c
fffffad800007b82ffcf830a
fffffbad0000713affcff968
fffffc5100006899ffd06652
fffffcd300006140ffd0cb3f
fffffd3c00005ae9ffd12954
fffffd9100005563ffd1817b
fffff89600008f77ffcb3eb7
fffffa07000080b5ffcbc6cc
fffffb14000074ceffcc418e
fffffbe000006affffccb175
fffffc7d000062c4ffcd1856
fffffcfa00005bc2ffcd779a
fffffd5e000055b9ffcdd058
fffffdaf00005076ffce2370
fffff8e50000889cffc834d7
fffffa4700007a77ffc8b65f
fffffb4900006f0fffc92b22
fffffc0d000065a9ffc9957e
fffffca400005dc8ffc9f737
fffffd1b00005714ffca51a6
fffffd7b0000514effcaa5d8
fffffdc900004c46ffcaf4a2
fffff92b000082a0ffc54e8a
fffffa7f00007506ffc5ca5c
fffffb7900006a0fffc639e7
fffffc3500006108ffc69f72
fffffcc600005977ffc6fcb3
fffffd3900005308ffc752f2
fffffd9500004d7cffc7a335
fffffde0000048a9ffc7ee48
fffff96900007d58ffc28778
fffffab20000703affc2fe41
fffffba3000065aaffc36933
fffffc5900005cf7ffc3ca83
fffffce5000055aeffc423d6
fffffd5400004f7bffc4766b
fffffdad00004a25ffc4c33c
fffffdf500004581ffc50b10
fffff9a2000078a4ffbfdc16
fffffae000006bf7ffc04e63
fffffbc9000061c2ffc0b53f
fffffc790000595cffc112ce
fffffd0100005253ffc168a6
fffffd6c00004c58ffc1b7fb
fffffdc200004732ffc201c0
fffffe08000042b7ffc246b5
fffff9d50000746bffbd4977
fffffb0a00006824ffbdb7be
fffffbec00005e43ffbe1af1
fffffc9600005622ffbe7524
fffffd1a00004f53ffbec7de
fffffd810000498affbf144d
fffffdd50000448fffbf5b5a
fffffe180000403affbf9dbf
fffffa0400007099ffbacd29
fffffb30000064b0ffbb37cd
fffffc0c00005b1bffbb97b2
fffffcb100005339ffbbeedc
fffffd3100004c9fffbc3ec8
fffffd9500004704ffbc889a
fffffde600004231ffbccd35
fffffe2800003dfeffbd0d4d
fffffa3000006d1fffb86519
fffffb540000618dffb8cc6e
fffffc290000583dffb92952
fffffcc900005095ffb97dbb
fffffd4500004a2cffb9cb1c
fffffda7000044baffba1290
fffffdf60000400bffba54f3
fffffe3600003bf9ffba92f6
fffffa58000069f1ffb60f81
fffffb7400005eaeffb673d0
fffffc440000559fffb6cdf6
fffffce000004e2cffb71fdb
fffffd59000047f0ffb76aea
fffffdb8000042a5ffb7b035
fffffe0400003e17ffb7f093
fffffe4300003a22ffb82cb0
fffffa7d00006704ffb3cadd
fffffb9200005c0affb42c63
fffffc5c00005337ffb48404
fffffcf500004bf6ffb4d39a
fffffd6b000045e4ffb51c87
fffffdc7000040bcffb55fd7
fffffe1200003c4dffb59e5c
fffffe4e00003872ffb5d8bc
fffffa9f0000644fffb195dc
fffffbae0000599affb1f4d0
fffffc73000050feffb24a1c
fffffd08000049ebffb29791
fffffd7b00004400ffb2de87
fffffdd600003ef9ffb32004
fffffe1e00003aa7ffb35cd4
fffffe59000036e5ffb3959a
fffffac0000061c9ffaf6f60
fffffbc800005755ffafcbee
fffffc8900004eeeffb01f10
fffffd1b00004806ffb06a8a
fffffd8b0000423fffb0afad
fffffde300003d57ffb0ef78
fffffe2a00003920ffb12ab4
fffffe6400003575ffb161ff
fffffadf00005f6bffad5675
fffffbe100005535ffadb0c4
fffffc9e00004cffffae01de
fffffd2c00004640ffae4b7e
fffffd990000409cffae8eed
fffffdf000003bd1ffaecd24
fffffe35000037b3ffaf06e6
fffffe6d0000341fffaf3ccf
fffffafd00005d2affab4a5d
fffffbf900005330ffaba28a
fffffcb200004b2bffabf1b7
fffffd3c00004493ffac3996
fffffda700003f10ffac7b68
fffffdfc00003a62ffacb822
fffffe400000365cffacf081
fffffe77000032ddffad251e
fffffb1c00005af7ffa94a9e
fffffc120000513bffa9a0b6
fffffcc600004966ffa9ee06
fffffd4d000042f7ffaa3435
fffffdb500003d94ffaa747b
fffffe0800003902ffaaafc6
fffffe4a00003514ffaae6d2
fffffe80000031a9ffab1a31
fffffb3d000058bcffa75720
fffffc2c00004f42ffa7ab1f
fffffcdb000047a2ffa7f690
fffffd5e0000415cffa83b10
fffffdc400003c1dffa879cc
fffffe14000037a8ffa8b3af
fffffe55000033d2ffa8e96c
fffffe890000307dffa91b94
fffffb650000564fffa5707f
fffffc4b00004d25ffa5c238
fffffcf3000045c2ffa60bac
fffffd7200003fadffa64e63
fffffdd500003a96ffa68b85
fffffe2200003641ffa6c3f1
fffffe6100003288ffa6f856
fffffe9300002f4affa7293f
fffffb9b00005366ffa3988b
fffffc7400004aa7ffa3e791
fffffd1300004396ffa42eb0
fffffd8c00003dc1ffa46f5b
fffffde9000038dcffa4aaaa
fffffe34000034b2ffa4e171
fffffe6f0000311affa51458
fffffea000002dfaffa543e2
fffffbeb00004f83ffa1d339
fffffcb000004762ffa21eac
fffffd41000040c8ffa262c1
fffffdb000003b4effa2a0cc
fffffe07000036b2ffa2d9cc
fffffe4c000032c2ffa30e87
fffffe8300002f5bffa33f95
fffffeb100002c63ffa36d75
fffffc65000049deffa02809
fffffd0b000042b0ffa06e50
fffffd8800003ccbffa0ae0e
fffffde8000037ddffa0e862
fffffe33000033afffa11e28
fffffe7000003018ffa1500c
fffffea100002cf9ffa17e94
fffffeca00002a3dffa1aa2f
fffffd1800004185ff9ea36b
fffffd9200003bb9ff9ee20a
fffffdf1000036e0ff9f1b56
fffffe3b000032c4ff9f5029
fffffe7700002f3cff9f8129
fffffea700002c2bff9faedd
fffffecf0000297bff9fd9b0
fffffef10000271bffa001fb
fffffdf9000035f0ff9d564f
fffffe42000031e5ff9d8a3a
fffffe7d00002e6cff9dba63
fffffead00002b68ff9de74d
fffffed4000028c3ff9e1162
fffffef50000266dff9e38fa
ffffff1100002458ff9e5e5d
ffffff290000227bff9e81c6
